// gated_ff -- master-slave flip-flop with clock gating on both latches.
//
// Two clock-gated latches are cascaded. The master is a positive gated latch
// (AND/XOR gating). It is transparent while ck = 1, and only when D differs
// from the stored master value qm. The slave is a negative gated latch
// (OR/XNOR gating). It is transparent while ck = 0, and only when qm differs
// from Q. When D does not change, neither latch's clock node moves.
// Because each latch gates its own clock, D may change at any time outside
// the setup/hold window. D may also have glitches, and the clock may have a
// 50% duty cycle. A single gated latch used as an edge-triggered element
// would misfire here.
//
// Timing: Q takes the value D had just before the falling edge of ck. It
// changes at that edge and holds for the rest of the cycle. The falling-edge
// capture follows from the circuit this design reproduces: there, the master
// pass gate is driven by a node pulled low while ck = 1 and D differs from
// Qm, and the slave pass gate by a node pulled low while ck = 0 and Q differs
// from Qm. That circuit keeps the master value inverted (Qm-bar); here it is
// kept in true form, which has the same logic function. The circuit has no
// reset, and neither has this module.
//
// Interface: ck, d, q, plus the two gated clock nodes ckm (master, active
// high, idle 0) and cks (slave, active low, idle 1), brought out for
// observing switching activity.
//
// The circuit warnings this module shows come from the two latches and from
// their comparator loops. They are intended; see gated_latch.
module gated_ff
  import lpff_pkg::*;
(
  input  logic ck,
  input  logic d,
  output logic q,
  output logic ckm,
  output logic cks
);

  timeunit 1ns;
  timeprecision 1ps;

  logic qm;

  gated_latch #(.POL(LATCH_POS)) u_master (
    .ck (ck),
    .d  (d),
    .q  (qm),
    .ckg(ckm)
  );

  gated_latch #(.POL(LATCH_NEG)) u_slave (
    .ck (ck),
    .d  (qm),
    .q  (q),
    .ckg(cks)
  );

endmodule
