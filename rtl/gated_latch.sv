// gated_latch -- level-sensitive latch with data-driven clock gating.
//
// The latch compares its data input with its own output. Only when they
// differ is the clock let through to the latch's enable node (ckg). When D
// equals Q the enable node stays idle whatever the clock does. That is where
// the power saving comes from: ckg carries the latch's large clock load, and
// the gating logic presents only a small load to ck.
//
//   POL = LATCH_POS: ckg = ck & (d ^ q); transparent while ckg = 1.
//                    This is the basic AND/XOR gated latch.
//   POL = LATCH_NEG: ckg = ck | ~(d ^ q); transparent while ckg = 0.
//                    This is its dual with OR gating and an XNOR comparator.
//
// Timing: when the clock is in its transparent phase and D differs from Q,
// ckg becomes active, the latch copies D, Q becomes equal to D, and ckg
// returns to idle. So ckg is active only for a moment (a zero-width pulse in
// simulation). After every change has settled, ckg is 0 for LATCH_POS and 1
// for LATCH_NEG. Seen from its pins, the latch behaves like an ordinary
// latch: Q follows D in the transparent phase and holds otherwise.
//
// Interface: ck (free-running clock), d (data), q (latch output) and ckg (the
// gated clock node, brought out so that its activity can be observed).
//
// The latch and the loop from q through the comparator back to the latch
// enable are the circuit being modelled. Both are intended. The loop
// settles in one step, because the copy makes the comparator inactive. The
// circuit warnings that tools give for this latch and for this loop are
// therefore expected. The gate-level form (XOR/AND, XNOR/OR) and the
// polarities follow the original circuit. There, in the transistor version,
// comparator and gate are merged into one complex CMOS gate; that has the
// same logic function. Bringing ckg out as a port, the enum parameter and
// the absence of a reset are choices of this RTL.
module gated_latch
  import lpff_pkg::*;
#(
  parameter latch_pol_e POL = LATCH_POS
) (
  input  logic ck,
  input  logic d,
  output logic q,
  output logic ckg
);

  timeunit 1ns;
  timeprecision 1ps;

  logic transparent;

  if (POL == LATCH_POS) begin : g_pos
    assign ckg         = ck & (d ^ q);
    assign transparent = ckg;
  end else begin : g_neg
    assign ckg         = ck | ~(d ^ q);
    assign transparent = ~ckg;
  end

  always_latch begin
    if (transparent) q <= d;
  end

endmodule
