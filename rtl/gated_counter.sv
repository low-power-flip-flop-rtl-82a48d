// gated_counter -- binary up-counter built from clock-gated flip-flops.
//
// Bit k of a binary counter toggles once every 2^k cycles. So the D input of
// its flip-flop has switching activity 2^-k: 1 for bit 0, 1/2 for bit 1, and
// so on. A clock-gated flip-flop saves power only at low D activity. In the
// original circuit's power comparison it is worse than a conventional flip-flop above an
// activity of about 0.16. Bits 0 to N_CONV-1 (activity 1, 1/2 and 1/4 for
// the default N_CONV = 3) therefore use the conventional conv_ff. Bits
// N_CONV and up use gated_ff. All bits share ck.
//
// Next-state logic is a plain incrementer: the D vector is count + 1. The
// count advances by one at every falling edge of ck and wraps from all-ones
// to zero. The original design describes no reset, enable or carry output,
// and none is added. After power-up the count starts from whatever the
// latches hold.
//
// Parameters: WIDTH, the counter width (the original design builds 8 and 16; the
// default is 8), and N_CONV, the number of low-order bits using conventional
// flip-flops (3 in the original design).
//
// Interface: ck; count, the counter value; ckm and cks, per-bit master and
// slave clock nodes. For the conventional bits these are ck itself. For the
// gated bits they are the gated nodes of gated_ff: ckm idles at 0 and cks
// at 1. They are brought out to observe clock activity. Synthesis reports
// the conventional bits of ckm and cks as outputs wired straight to an
// input; that is intended, since those clock nodes are ck.
//
// Circuit warnings about latches and comparator loops come from the
// flip-flops and are intended; see gated_latch.
module gated_counter #(
  parameter int unsigned WIDTH  = 8,
  parameter int unsigned N_CONV = 3
) (
  input  logic             ck,
  output logic [WIDTH-1:0] count,
  output logic [WIDTH-1:0] ckm,
  output logic [WIDTH-1:0] cks
);

  timeunit 1ns;
  timeprecision 1ps;

  logic [WIDTH-1:0] nxt;

  assign nxt = count + 1'b1;

  for (genvar k = 0; k < WIDTH; k++) begin : g_bit
    if (k < N_CONV) begin : g_conv
      conv_ff u_ff (
        .ck(ck),
        .d (nxt[k]),
        .q (count[k])
      );
      assign ckm[k] = ck;
      assign cks[k] = ck;
    end else begin : g_gated
      gated_ff u_ff (
        .ck (ck),
        .d  (nxt[k]),
        .q  (count[k]),
        .ckm(ckm[k]),
        .cks(cks[k])
      );
    end
  end

endmodule
