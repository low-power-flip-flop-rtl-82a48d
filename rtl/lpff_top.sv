// lpff_top -- the clock-gated flip-flop and its two counter applications.
//
// Three circuits share one clock ck:
//   * a stand-alone clock-gated flip-flop (gated_ff) with data input d and
//     output q, the circuit whose transient behaviour the original design checks at
//     50 MHz and 50% duty cycle with glitches on D;
//   * an 8 bit counter and a 16 bit counter (gated_counter). In each,
//     bits 0-2 use conventional flip-flops and the remaining bits use
//     clock-gated flip-flops. These are the two counters whose power the
//     original design compares against all-conventional counters.
// All three change state on the falling edge of ck. None has a reset,
// because the original flip-flop circuit has none.
//
// Ports: ck; d and q of the stand-alone flip-flop with its gated clock nodes
// ckm and cks; count8 and count16 with their per-bit clock nodes
// (ckm8/cks8, ckm16/cks16), which show where the clock is gated.
// Putting the three circuits side by side in one top is this RTL's choice.
//
// Circuit warnings about latches and comparator loops come from the
// flip-flops and are intended; see gated_latch.
module lpff_top (
  input  logic        ck,
  input  logic        d,
  output logic        q,
  output logic        ckm,
  output logic        cks,
  output logic [7:0]  count8,
  output logic [7:0]  ckm8,
  output logic [7:0]  cks8,
  output logic [15:0] count16,
  output logic [15:0] ckm16,
  output logic [15:0] cks16
);

  timeunit 1ns;
  timeprecision 1ps;

  gated_ff u_ff (
    .ck (ck),
    .d  (d),
    .q  (q),
    .ckm(ckm),
    .cks(cks)
  );

  gated_counter #(.WIDTH(8), .N_CONV(3)) u_cnt8 (
    .ck   (ck),
    .count(count8),
    .ckm  (ckm8),
    .cks  (cks8)
  );

  gated_counter #(.WIDTH(16), .N_CONV(3)) u_cnt16 (
    .ck   (ck),
    .count(count16),
    .ckm  (ckm16),
    .cks  (cks16)
  );

endmodule
