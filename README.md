# Clock-gated master-slave flip-flop

In a conventional flip-flop, the clock drives the transistors of both
latches every cycle, whether or not the data changes. When the data input
seldom changes, most of the flip-flop's power goes into clocking a state
that stays the same. This design removes that waste inside the flip-flop.
Each of its two latches compares its own input with its own output, and it
lets the clock reach its storage transistors only when the two differ. When
D is idle, neither latch's clock node moves at all.

The RTL models this at the logic level:

| module          | what it is                                                              |
|-----------------|-------------------------------------------------------------------------|
| `lpff_pkg`      | the `latch_pol_e` enum: positive or negative gated latch                |
| `gated_latch`   | one level-sensitive latch with its comparator and clock gate            |
| `gated_ff`      | positive gated master latch + negative gated slave latch                |
| `conv_ff`       | the same master-slave flip-flop without gating                          |
| `gated_counter` | binary counter: conventional flip-flops on bits 0-2, gated on the rest  |
| `lpff_top`      | a stand-alone `gated_ff`, an 8 bit and a 16 bit `gated_counter`, one clock |

## The gated latch

```
             +-------------------------------+
  d ---------+---> D    latch    Q ----------+-----> q
             |          clk                  |
             |           ^                   |
  ck ---[ gating ]--ckg--+     [comparator]<-+
             ^                      ^   |
             |                      d   |
             +----------------------------+
```

A positive latch (`POL = LATCH_POS`) is transparent while its enable is 1:

    ckg = ck & (d ^ q)        transparent while ckg = 1

* While ck = 0, ckg is 0 and the latch holds, as any positive latch does.
* While ck = 1 and d = q, ckg is still 0. The latch would copy a value it
  already has, so the gate blocks the clock.
* While ck = 1 and d != q, ckg rises and the latch copies d. Now q = d, the
  comparator output drops, and ckg falls again.

Seen from its pins it is an ordinary latch. Internally, the heavily loaded
enable node ckg switches only when the stored value must change. The clock
sees only the small input of the gating logic. The saving assumes ckg's
load is larger than that input.

The negative latch (`POL = LATCH_NEG`) is the dual. It uses an OR gate and
an XNOR comparator:

    ckg = ck | ~(d ^ q)       transparent while ckg = 0

Its enable idles at 1 and drops only while ck = 0 and d differs from q.

In simulation ckg is a zero-width pulse: it rises and falls within one time
step. The module brings ckg out as a port. Event controls such as
`@(posedge ckg)` see every pulse, so the testbenches can count clock-node
activity exactly.

## Why two gated latches, and which edge

A single gated latch cannot be made edge-triggered by narrowing its clock.
If D changes while the clock is high, the gating opens, and the element
changes state at that moment, not at a clock edge. Earlier gated designs
avoided this in one of two ways. Some forbade D from changing during one
clock phase, which is a duty-cycle constraint. Others used a finely tuned
pulse generator.

`gated_ff` avoids both by gating each latch of an ordinary master-slave pair
separately:

* master: positive gated latch, `d -> qm`, clock node `ckm` (idle 0);
* slave: negative gated latch, `qm -> q`, clock node `cks` (idle 1).

While ck = 1, the master follows D, glitches included, but only when D
differs from qm. The slave is closed. While ck = 0, the master is closed,
and the slave copies qm if it differs from q. **Q therefore takes the value
D had just before the falling edge of ck.** A glitch on D in either phase
that returns before the falling edge leaves Q unchanged. In a cycle where D
equals Q, neither `ckm` nor `cks` moves.

The falling-edge capture comes from the transistor circuit this RTL
reproduces. There, the master pass gate is driven by a node that is pulled
active only while ck = 1 and D differs from the master's value. The slave
pass gate is driven by a node that is pulled active only while ck = 0 and Q
differs from the master's value. For a rising-edge part, invert ck at the
input. The circuit also merges comparator and gate into one complex CMOS
gate, stores the master value inverted and uses static transmission-gate
latches. The RTL keeps only the logic function of those choices.

Timing:

* The stored value changes at the falling edge of ck.
* Q is valid right after that edge and holds until the next one.
* The tests keep D still for 1 ns on each side of the falling edge. That is
  an assumed setup/hold window; the RTL has no real timing.
* The flip-flop works with a 50% duty-cycle clock. Nothing restricts when D
  may change outside that window.

## Where gating pays: the counter

Gating costs power whenever D changes: the comparator and gate switch too,
and the transistor circuit is larger. So the gated flip-flop wins only at
low data activity. Data activity here is the average number of D
transitions per clock cycle. In the original 0.8 µm, 5 V, 50 MHz circuit
study:

* with D idle, the gated flip-flop used about a third of a conventional
  flip-flop's power;
* above an activity of about 0.16 it used more.

In a binary counter, bit k toggles once every 2^k cycles, so its activity is
2^-k. `gated_counter` therefore uses:

* conventional flip-flops (`conv_ff`) for bits 0 to `N_CONV-1`: activity 1,
  1/2 and 1/4 for the default `N_CONV = 3`;
* gated flip-flops (`gated_ff`) for the rest, from bit 3 (activity 1/8) up.

The next-state logic is a plain incrementer (`count + 1`). In a gated bit,
D differs from Q only in the cycle before the bit toggles. So the bit's
master and slave clock nodes each pulse exactly once per toggle. A
conventional bit clocks every cycle. In the circuit study, gating saved
17% of total counter power at 8 bits and 38% at 16 bits. That includes
flip-flops, incrementer logic and clock buffer.

| parameter | default | meaning                                                |
|-----------|---------|--------------------------------------------------------|
| `WIDTH`   | 8       | counter width; `lpff_top` builds 8 and 16             |
| `N_CONV`  | 3       | low-order bits that use conventional flip-flops        |

`ckm`/`cks` of `gated_counter` are per-bit clock-node observation outputs.
For the conventional bits they are wired to ck: those clock nodes really do
follow ck. Synthesis reports those bits as outputs wired to an input.

## Interfaces

`gated_latch #(POL)`: `ck`, `d` → `q`, `ckg`.

`gated_ff`: `ck`, `d` → `q`, `ckm` (active high, idle 0), `cks` (active low,
idle 1).

`conv_ff`: `ck`, `d` → `q`.

`gated_counter #(WIDTH, N_CONV)`: `ck` → `count[WIDTH]`, `ckm[WIDTH]`,
`cks[WIDTH]`.

`lpff_top`: `ck`; the stand-alone flip-flop's `d`, `q`, `ckm`, `cks`;
`count8`, `ckm8`, `cks8`; `count16`, `ckm16`, `cks16`. There are no
parameters.

None of the blocks has a reset. The flip-flop circuit has none, so after
power-up each latch holds an arbitrary value. The counters start from
whatever value that gives, and the testbenches take the value after the
first clock cycle as their reference.

## What the tests show

Every testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.

| testbench            | what it checks                                                                |
|----------------------|-------------------------------------------------------------------------------|
| `tb_gated_latch`     | both polarities against a reference latch, with random ck/d; ckg idle after every change; exact count of gated clock pulses |
| `tb_gated_ff`        | 50 MHz, 50% duty cycle; random D with glitches in both phases; Q = D sampled at the falling edge, and no change anywhere else; exact master/slave pulse counts; directed case list (capture, low-phase glitch, high-phase glitch) |
| `tb_conv_ff`         | the same sampling reference for the ungated flip-flop                         |
| `tb_gated_counter`   | 8 and 16 bit counters over 2^16 + 300 cycles: +1 per cycle, wrap, per-bit clock pulses = per-bit toggles; prints activity per bit |
| `tb_lpff_top`        | whole top at its defaults over 2^16 + 200 cycles; all of the above together; each mechanism (capture, quiet cycle, both glitch kinds, both wraps) must occur |
| `tb_activity_sweep`  | gated flip-flop at D activity 0 to 0.4; exact pulse counts; no clock activity at all at activity 0; prints clock pulses per cycle for each activity |

The sweep makes the mechanism visible. At activity a, the master clock node
pulses about a times per cycle and the slave a little less often. A
conventional flip-flop's latch clocks switch once per cycle. How that
translates into power depends on the circuit's capacitances, which the RTL
does not have.

## Simulating

All testbenches build with Verilator 5. For example, the end-to-end test:

```
verilator --binary --timing -Wno-fatal -Irtl \
    rtl/lpff_pkg.sv rtl/lpff_top.sv tb/tb_lpff_top.sv --top-module tb_lpff_top
./obj_dir/Vtb_lpff_top
```

For another testbench, replace the top file and the testbench name (for
instance `rtl/gated_ff.sv tb/tb_gated_ff.sv --top-module tb_gated_ff`).
`-Irtl` lets Verilator find the submodules by name. Each run takes well
under a second.

`-Wno-fatal` is needed because Verilator warns about the design's intended
structures:

* `UNOPTFLAT` (combinational loop): the loop from q through the comparator
  back to the latch enable. It is the design itself, and it settles in one
  step because copying d makes the comparator inactive.
* `COMBDLY`, `NOLATCH`: the latches are written as `always_latch` with
  non-blocking assignments.

## Limits and departures

* **Logic level only.** Device sizes, the 0.8 µm process, the merged
  comparator/gate transistor network and the transmission-gate latches are
  not modelled. Neither is power: the RTL gives clock-node activity, not
  µW.
* **Implementation.** In silicon this flip-flop is a custom cell. Handed to
  standard-cell synthesis, the RTL becomes latches with logic feeding their
  enables from their own outputs. Static timing tools cannot judge that
  structure, and the pulse on ckg is as short as the latch's own delay.
  Treat the RTL as a functional model of the cell, or as the reference for
  an equivalence check of a custom layout.
* **Conventional flip-flop.** Only its role is defined: an ungated
  flip-flop with the same device sizing. `conv_ff` is this RTL's choice of
  structure: the same master-slave pair, clocked directly.
* **Counter.** Up-counting, free-running, with no reset, enable or carry
  out; the incrementer is this RTL's choice. The clock buffer that drives
  the counter's clock net has no logic function and is not modelled.
* **Edge.** Falling edge, as the circuit was drawn. The setup/hold window
  used in the tests is an assumption.
* **Top.** Placing the stand-alone flip-flop and both counters on one clock
  in `lpff_top` is only a convenient way to exercise all three together.
