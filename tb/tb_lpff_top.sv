// tb_lpff_top -- end-to-end test of lpff_top at its default sizes.
//
// One 50 MHz, 50% duty-cycle clock drives the stand-alone gated flip-flop
// and both counters. The test runs for 2^16 + 200 cycles, so the 16 bit
// counter wraps once and the 8 bit counter wraps many times. Meanwhile the
// flip-flop's D is driven with random changes and glitches in both clock
// phases, and is held still for 1 ns on each side of the falling edge.
//
// Checks:
//   * flip-flop: Q equals D sampled at the falling edge and changes at no
//     other time; the gated clock nodes pulse exactly as often as a
//     reference master/slave latch model says they must;
//   * counters: +1 per cycle modulo 2^WIDTH, held during the cycle; every
//     gated bit's clock nodes pulse once per toggle of that bit.
// Each mechanism must occur at least once, or the test counts a failure:
// a captured D change, an idle cycle in which both gated clocks stay
// quiet, a D glitch in the high phase and one in the low phase that must
// not trigger the flip-flop, and the wrap of each counter.
module tb_lpff_top;
  timeunit 1ns;
  timeprecision 1ns;

  localparam int TCK    = 20;
  localparam int CYCLES = (1 << 16) + 200;

  logic        ck = 1'b1;
  logic        d  = 1'b0;
  logic        q, ckm, cks;
  logic [7:0]  count8, ckm8, cks8, e8;
  logic [15:0] count16, ckm16, cks16, e16;
  logic        q_exp, qm_m;
  logic        edge_now = 1'b1;
  int          checks = 0, failures = 0;
  int          n_ckm = 0, n_cks = 0, n_ckm_exp = 0, n_cks_exp = 0;
  int          n_capture = 0, n_quiet = 0, n_glitch_hi = 0, n_glitch_lo = 0;
  int          n_wrap8 = 0, n_wrap16 = 0;
  int          pm16 = 0, ps16 = 0, pm8 = 0, ps8 = 0;  // pulses summed over gated bits
  int          tg16 = 0, tg8 = 0;                      // toggles summed over gated bits

  lpff_top dut (
    .ck(ck), .d(d), .q(q), .ckm(ckm), .cks(cks),
    .count8(count8), .ckm8(ckm8), .cks8(cks8),
    .count16(count16), .ckm16(ckm16), .cks16(cks16)
  );

  always @(posedge ckm) n_ckm++;
  always @(negedge cks) n_cks++;
  for (genvar k = 3; k < 8; k++) begin : g_mon8
    always @(posedge ckm8[k]) pm8++;
    always @(negedge cks8[k]) ps8++;
  end
  for (genvar k = 3; k < 16; k++) begin : g_mon16
    always @(posedge ckm16[k]) pm16++;
    always @(negedge cks16[k]) ps16++;
  end

  always @(q) begin
    if (!edge_now) begin
      failures++;
      $display("FAIL flip-flop q changed away from a falling edge at %0t", $time);
    end
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Toggle D a random number of times (0..3) in a window of a clock phase,
  // updating the master latch model when the master is transparent.
  task automatic wiggle(input int first, input logic master_open, output int n, output int t);
    n = 0;
    t = first;
    for (int i = $urandom_range(0, 3); i > 0; i--) begin
      int dt;
      dt = $urandom_range(1, 3);
      if (t + dt > TCK / 2 - 1) break;
      #(dt);
      t += dt;
      d = ~d;
      n++;
      if (master_open) begin
        n_ckm_exp++;
        qm_m = d;
      end
    end
  endtask

  initial begin : watchdog
    #(TCK * (CYCLES + 100));
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Settling cycle with D = 0: flip-flop and counters leave power-up.
    #(TCK / 2);
    ck = 1'b0;
    #(TCK / 2);
    edge_now = 1'b0;
    qm_m = d;
    e8   = count8;
    e16  = count16;
    n_ckm = 0; n_cks = 0; pm8 = 0; ps8 = 0; pm16 = 0; ps16 = 0;
    for (int c = 0; c < CYCLES; c++) begin
      int   nh, nl, t;
      int   ckm0, cks0;
      logic d0;
      ckm0 = n_ckm;
      cks0 = n_cks;
      // high phase: master transparent
      ck = 1'b1;
      if (d != qm_m) begin
        n_ckm_exp++;
        qm_m = d;
      end
      d0 = d;
      wiggle(0, 1'b1, nh, t);
      #(TCK / 2 - t);
      // falling edge
      q_exp = d;
      if (nh > 0 && d == d0 && d == q) n_glitch_hi++;
      if (q_exp != q) begin
        n_capture++;
        n_cks_exp++;
      end
      tg8  += $countones((e8 ^ 8'(e8 + 1'b1)) >> 3);
      tg16 += $countones((e16 ^ 16'(e16 + 1'b1)) >> 3);
      e8  = e8 + 1'b1;
      e16 = e16 + 1'b1;
      if (e8 == '0) n_wrap8++;
      if (e16 == '0) n_wrap16++;
      edge_now = 1'b1;
      ck = 1'b0;
      #1;
      edge_now = 1'b0;
      check(q == q_exp, "flip-flop q after falling edge");
      check(count8 == e8, $sformatf("8 bit count %0d expected %0d", count8, e8));
      check(count16 == e16, $sformatf("16 bit count %0d expected %0d", count16, e16));
      check(ckm == 1'b0 && cks == 1'b1, "flip-flop gated clocks idle");
      // low phase: master closed, D may change freely
      wiggle(1, 1'b0, nl, t);
      if (nl > 1) n_glitch_lo++;
      #(TCK / 2 - t);
      check(q == q_exp && count8 == e8 && count16 == e16, "state held through low phase");
      if (n_ckm == ckm0 && n_cks == cks0) n_quiet++;
    end
    check(n_ckm == n_ckm_exp, $sformatf("flip-flop master pulses %0d expected %0d", n_ckm, n_ckm_exp));
    check(n_cks == n_cks_exp, $sformatf("flip-flop slave pulses %0d expected %0d", n_cks, n_cks_exp));
    check(pm8 == tg8 && ps8 == tg8, $sformatf("8 bit gated pulses %0d/%0d toggles %0d", pm8, ps8, tg8));
    check(pm16 == tg16 && ps16 == tg16, $sformatf("16 bit gated pulses %0d/%0d toggles %0d", pm16, ps16, tg16));
    $display("flip-flop: %0d captured changes, %0d cycles with both gated clocks quiet",
             n_capture, n_quiet);
    $display("flip-flop: %0d high-phase glitches, %0d low-phase glitches ignored",
             n_glitch_hi, n_glitch_lo);
    $display("flip-flop: master clock pulses %0d, slave %0d, over %0d cycles",
             n_ckm, n_cks, CYCLES);
    $display("counters: 8 bit wrapped %0d times, 16 bit %0d times", n_wrap8, n_wrap16);
    $display("gated-bit clock pulses per cycle: 8 bit %0.4f, 16 bit %0.4f (a conventional bit: 1)",
             real'(pm8) / CYCLES, real'(pm16) / CYCLES);
    check(n_capture > 0, "mechanism: captured D change");
    check(n_quiet > 0, "mechanism: idle cycle with gated clocks quiet");
    check(n_glitch_hi > 0, "mechanism: high-phase glitch ignored");
    check(n_glitch_lo > 0, "mechanism: low-phase glitch ignored");
    check(n_wrap8 > 0, "mechanism: 8 bit counter wrap");
    check(n_wrap16 > 0, "mechanism: 16 bit counter wrap");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
