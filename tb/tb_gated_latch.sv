// tb_gated_latch -- self-checking test of both polarities of gated_latch.
//
// A positive (AND/XOR) and a negative (OR/XNOR) gated latch get the same
// random clock and data. A reference model of an ordinary latch predicts
// Q: a positive latch follows D while ck = 1 and a negative one while
// ck = 0, and each holds otherwise. After each stimulus change, the test
// checks Q against the model. It also checks that the gated clock node has
// returned to idle (0 for the positive latch, 1 for the negative one), which
// is the gating property: ckg is active only while D and Q differ.
// It also counts the changes in which a transparent latch saw D differ from
// Q. These are the only moments the gated clock may fire. It checks that the
// number of gated clock pulses equals that count exactly, and that both
// firing and gated-off transparent phases occurred.
module tb_gated_latch;
  timeunit 1ns;
  timeprecision 1ns;
  import lpff_pkg::*;

  logic ck = 1'b0;
  logic d  = 1'b0;
  logic qp, ckgp, qn, ckgn;
  logic mp, mn;              // reference latch states
  int   checks = 0, failures = 0;
  int   n_update_p = 0, n_update_n = 0, n_hold_p = 0, n_hold_n = 0;
  int   n_pulse_p = 0, n_pulse_n = 0;

  // Gated clock pulses (active high for the positive latch, low for the
  // negative one).
  always @(posedge ckgp) n_pulse_p++;
  always @(negedge ckgn) n_pulse_n++;

  gated_latch #(.POL(LATCH_POS)) dut_p (.ck(ck), .d(d), .q(qp), .ckg(ckgp));
  gated_latch #(.POL(LATCH_NEG)) dut_n (.ck(ck), .d(d), .q(qn), .ckg(ckgn));

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b at %0t", what, got, exp, $time);
    end
  endtask

  // Apply one change of ck or d, update the model, then check.
  task automatic step(input logic new_ck, input logic new_d);
    ck = new_ck;
    d  = new_d;
    if (ck) begin
      if (mp != d) n_update_p++; else n_hold_p++;
      mp = d;
    end
    if (!ck) begin
      if (mn != d) n_update_n++; else n_hold_n++;
      mn = d;
    end
    #1;
    check(qp, mp, "positive latch q");
    check(qn, mn, "negative latch q");
    check(ckgp, 1'b0, "positive latch ckg idle");
    check(ckgn, 1'b1, "negative latch ckg idle");
  endtask

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("FAIL watchdog expired");
    check(n_pulse_p == n_update_p, 1'b1, "positive gated clock pulse count");
    check(n_pulse_n == n_update_n, 1'b1, "negative gated clock pulse count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1;
    // Whatever the latches held at power-up is the model's start state.
    mp = qp;
    mn = qn;
    check(qp, ck ? d : mp, "initial positive");
    n_pulse_p = 0;
    n_pulse_n = 0;
    // Directed: data change in each phase for both latches.
    step(1'b0, ~qp);           // positive holds, negative follows
    step(1'b1, d);             // positive opens with D != Q
    step(1'b1, ~d);            // data changes while positive transparent
    step(1'b0, d);             // positive closes
    step(1'b0, ~d);            // negative transparent, positive holds
    step(1'b1, d);
    // Random stimulus.
    for (int i = 0; i < 2000; i++) begin
      logic nck, nd;
      nck = $urandom_range(0, 1) != 0 ? ~ck : ck;
      nd  = $urandom_range(0, 2) == 0 ? ~d : d;
      step(nck, nd);
    end
    if (n_update_p == 0 || n_update_n == 0 || n_hold_p == 0 || n_hold_n == 0) begin
      failures++;
      $display("FAIL coverage: updates %0d/%0d holds %0d/%0d",
               n_update_p, n_update_n, n_hold_p, n_hold_n);
    end
    $display("positive latch: %0d gated-clock firings, %0d transparent phases gated off",
             n_update_p, n_hold_p);
    $display("negative latch: %0d gated-clock firings, %0d transparent phases gated off",
             n_update_n, n_hold_n);
    check(n_pulse_p == n_update_p, 1'b1, "positive gated clock pulse count");
    check(n_pulse_n == n_update_n, 1'b1, "negative gated clock pulse count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
