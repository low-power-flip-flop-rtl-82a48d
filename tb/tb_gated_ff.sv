// tb_gated_ff -- self-checking test of the clock-gated master-slave flip-flop.
//
// ck is a 50 MHz clock with 50% duty cycle (20 ns period, high for 10 ns),
// the condition under which the flip-flop is meant to work without timing
// failures. D changes at random moments, several times in some cycles and
// in neither clock phase in others. This includes short glitches while ck
// is high that return before the falling edge, and glitches while ck is low.
// D is kept still for at least 1 ns on each side of the falling edge (setup/hold).
//
// Checks, against a reference that samples D at each falling edge:
//   * Q equals the sampled value after each falling edge;
//   * Q never changes except at a falling edge (a glitch must not trigger
//     the flip-flop);
//   * the gated clock nodes are idle (ckm = 0, cks = 1) at every check;
//   * the master clock node pulses exactly once per D change seen by the
//     open master (ck rising with D != Qm, or D changing while ck = 1), and
//     the slave clock node exactly once per change of Q.
// A directed sequence first reproduces the cases of the design's
// transient check: a D pulse captured by one edge, a glitch in the low
// phase, and a glitch in the high phase that ends before the edge.
// Coverage counters make sure captured changes, idle cycles and both kinds
// of glitch all occurred.
module tb_gated_ff;
  timeunit 1ns;
  timeprecision 1ns;

  localparam int TCK = 20;  // 50 MHz

  logic ck = 1'b1;
  logic d  = 1'b0;
  logic q, ckm, cks;
  logic q_exp;
  logic edge_now = 1'b0;
  int   checks = 0, failures = 0;
  int   n_capture = 0, n_idle = 0, n_glitch_hi = 0, n_glitch_lo = 0;
  int   n_ckm_pulse = 0, n_cks_pulse = 0;
  int   n_ckm_exp = 0, n_cks_exp = 0;
  logic qm_m;                // reference master latch state

  gated_ff dut (.ck(ck), .d(d), .q(q), .ckm(ckm), .cks(cks));

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b at %0t", what, got, exp, $time);
    end
  endtask

  // Gated clock activity, if the simulator shows the short pulses.
  always @(posedge ckm) n_ckm_pulse++;
  always @(negedge cks) n_cks_pulse++;

  // Q may change only at a falling edge of ck.
  always @(q) begin
    if (!edge_now) begin
      failures++;
      $display("FAIL q changed away from a falling clock edge at %0t", $time);
    end
  end

  // One clock cycle starting at a rising edge. ck is high for TCK/2, then
  // the falling edge samples D, then low for TCK/2. The d_hi/d_lo queues
  // give (delay, value) changes of D inside the high and low phases.
  task automatic cycle(input int t_hi[$], input logic v_hi[$],
                       input int t_lo[$], input logic v_lo[$]);
    int      used;
    logic    d_start;
    ck = 1'b1;
    if (d != qm_m) n_ckm_exp++;  // master opens: gated clock fires
    qm_m = d;
    d_start = d;
    used = 0;
    foreach (t_hi[i]) begin
      #(t_hi[i] - used);
      used = t_hi[i];
      d = v_hi[i];
      n_ckm_exp++;                 // D changed while master transparent
      qm_m = d;
    end
    #(TCK / 2 - used);
    // falling edge: D sampled
    if (t_hi.size() > 0 && d == d_start && d != q) n_glitch_hi++;
    q_exp = d;
    if (q_exp != q) begin
      n_capture++;
      n_cks_exp++;                 // slave opens: gated clock fires
    end else n_idle++;
    edge_now = 1'b1;
    ck = 1'b0;
    #1;
    edge_now = 1'b0;
    check(q, q_exp, "q after falling edge");
    check(ckm, 1'b0, "ckm idle");
    check(cks, 1'b1, "cks idle");
    used = 1;
    foreach (t_lo[i]) begin
      #(t_lo[i] - used);
      used = t_lo[i];
      d = v_lo[i];
    end
    if (t_lo.size() > 1) n_glitch_lo++;
    #(TCK / 2 - used);
    check(q, q_exp, "q held through low phase");
    check(ckm, 1'b0, "ckm idle at end of cycle");
    check(cks, 1'b1, "cks idle at end of cycle");
  endtask

  initial begin : watchdog
    #(TCK * 5000);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Settle: one plain cycle with D = 0 brings Q to a known value.
    edge_now = 1'b1;
    cycle('{}, '{}, '{}, '{});
    #0;
    edge_now = 1'b0;
    qm_m = d;
    n_ckm_pulse = 0;
    n_cks_pulse = 0;
    n_ckm_exp = 0;
    n_cks_exp = 0;
    n_capture = 0;
    n_idle = 0;
    // Directed sequence.
    cycle('{5}, '{1'b1}, '{}, '{});            // D rises in high phase: Q -> 1
    cycle('{}, '{}, '{}, '{});                   // idle
    cycle('{}, '{}, '{2}, '{1'b0});      // D falls early in low phase
    cycle('{}, '{}, '{}, '{});                   // Q -> 0
    cycle('{}, '{}, '{3, 6}, '{1'b1, 1'b0}); // glitch in low phase: no effect
    cycle('{}, '{}, '{}, '{});
    cycle('{3, 7}, '{1'b1, 1'b0}, '{}, '{}); // glitch in high phase, ends before edge
    cycle('{}, '{}, '{}, '{});
    // Random cycles.
    for (int n = 0; n < 3000; n++) begin
      automatic int   th[$], tl[$];
      automatic logic vh[$], vl[$];
      int      k;
      logic    v;
      v = d;
      k = $urandom_range(0, 3);
      for (int i = 0; i < k; i++) begin
        v = ~v;
        th.push_back(1 + 3 * i + $urandom_range(0, 2));
        vh.push_back(v);
      end
      k = $urandom_range(0, 3);
      for (int i = 0; i < k; i++) begin
        v = ~v;
        tl.push_back(2 + 2 * i + $urandom_range(0, 1));
        vl.push_back(v);
      end
      cycle(th, vh, tl, vl);
    end
    if (n_capture == 0 || n_idle == 0 || n_glitch_hi == 0 || n_glitch_lo == 0) begin
      failures++;
      $display("FAIL coverage: capture %0d idle %0d glitch_hi %0d glitch_lo %0d",
               n_capture, n_idle, n_glitch_hi, n_glitch_lo);
    end
    $display("cycles with Q change %0d, without %0d, high-phase glitches %0d, low-phase glitches %0d",
             n_capture, n_idle, n_glitch_hi, n_glitch_lo);
    $display("gated clock pulses: master %0d (expected %0d), slave %0d (expected %0d), conventional clock %0d",
             n_ckm_pulse, n_ckm_exp, n_cks_pulse, n_cks_exp, n_capture + n_idle);
    check(n_ckm_pulse == n_ckm_exp, 1'b1, "master gated clock pulse count");
    check(n_cks_pulse == n_cks_exp, 1'b1, "slave gated clock pulse count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
