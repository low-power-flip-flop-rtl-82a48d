// conv_ff -- conventional (non-gated) master-slave flip-flop.
//
// This is the reference flip-flop: the same master-slave structure as
// gated_ff, but both latches are clocked directly by ck, so their clock
// nodes switch every cycle whatever D does. The original design uses it for the
// low-order bits of a counter, whose D inputs change so often that gating
// would cost more power than it saves.
//
// Timing matches gated_ff, so the two can share one clock: the master is
// transparent while ck = 1, the slave while ck = 0, and Q takes the value D
// had just before the falling edge of ck. There is no reset, as in gated_ff.
// The original design gives only its role and sizing; the
// latch-pair form here is this RTL's reading of "conventional".
//
// Interface: ck, d, q.
//
// The two latches are intended; tools report them as latches.
module conv_ff (
  input  logic ck,
  input  logic d,
  output logic q
);

  timeunit 1ns;
  timeprecision 1ps;

  logic qm;

  always_latch begin
    if (ck) qm <= d;
  end

  always_latch begin
    if (!ck) q <= qm;
  end

endmodule
