// tb_activity_sweep -- gated flip-flop against D switching activity.
//
// This is the flip-flop's characterisation sweep at 50 MHz. Switching
// activity is the average number of D transitions per clock cycle. For each
// activity in {0, 0.05, 0.10, 0.16, 0.20, 0.30, 0.40}, 4000 cycles are run.
// In each cycle D toggles once with that probability, at a random moment in
// either clock phase, and never within 1 ns of the falling edge.
//
// The RTL has no notion of power. What it shows is how often the flip-flop's
// internal clock nodes switch. A conventional flip-flop switches its latch
// clocks every cycle. The gated one switches its master clock once per D
// transition seen by the open master, and its slave clock once per change of
// Q. The test checks Q against a sampled-D reference every cycle. For each
// activity it checks that there were exactly as many master clock pulses as
// the reference predicts, and as many slave pulses as changes of Q. At
// activity 0 it checks that neither clock node switched at all. It prints
// the pulses per cycle for each activity.
module tb_activity_sweep;
  timeunit 1ns;
  timeprecision 1ns;

  localparam int TCK    = 20;
  localparam int CYCLES = 4000;
  localparam int N_ACT  = 7;
  localparam int ACT_PERMILLE[N_ACT] = '{0, 50, 100, 160, 200, 300, 400};

  logic ck = 1'b1;
  logic d  = 1'b0;
  logic q, ckm, cks, qm_m;
  int   checks = 0, failures = 0;
  int   n_ckm = 0, n_cks = 0;

  gated_ff dut (.ck(ck), .d(d), .q(q), .ckm(ckm), .cks(cks));

  always @(posedge ckm) n_ckm++;
  always @(negedge cks) n_cks++;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin : watchdog
    #(TCK * (N_ACT * CYCLES + 100));
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Settle from power-up with D = 0.
    #(TCK / 2);
    ck = 1'b0;
    #(TCK / 2);
    qm_m = d;
    for (int a = 0; a < N_ACT; a++) begin
      int ckm_exp, cks_exp, n_tr, ckm0, cks0;
      ckm_exp = 0;
      cks_exp = 0;
      n_tr    = 0;
      ckm0    = n_ckm;
      cks0    = n_cks;
      for (int c = 0; c < CYCLES; c++) begin
        bit    toggle;
        int    at;                 // 1..9 high phase, 11..19 low phase
        logic  q_exp;
        toggle = $urandom_range(0, 999) < ACT_PERMILLE[a];
        at     = $urandom_range(0, 1) ? $urandom_range(1, 9) : $urandom_range(11, 19);
        ck = 1'b1;
        if (d != qm_m) begin
          ckm_exp++;
          qm_m = d;
        end
        if (toggle && at < TCK / 2) begin
          #(at);
          d = ~d;
          n_tr++;
          ckm_exp++;
          qm_m = d;
          #(TCK / 2 - at);
        end else begin
          #(TCK / 2);
        end
        q_exp = d;
        if (q_exp != q) cks_exp++;
        ck = 1'b0;
        #1;
        check(q == q_exp, "q after falling edge");
        if (toggle && at > TCK / 2) begin
          #(at - TCK / 2 - 1);
          d = ~d;
          n_tr++;
          #(TCK - at);
        end else begin
          #(TCK / 2 - 1);
        end
      end
      check(n_ckm - ckm0 == ckm_exp, $sformatf("master pulses %0d expected %0d", n_ckm - ckm0, ckm_exp));
      check(n_cks - cks0 == cks_exp, $sformatf("slave pulses %0d expected %0d", n_cks - cks0, cks_exp));
      if (ACT_PERMILLE[a] == 0) check(n_ckm == ckm0 && n_cks == cks0, "no clock activity at idle D");
      $display("activity %4.2f (measured %6.4f): master clock %6.4f, slave clock %6.4f pulses/cycle; conventional 1.0000",
               ACT_PERMILLE[a] / 1000.0, real'(n_tr) / CYCLES,
               real'(n_ckm - ckm0) / CYCLES, real'(n_cks - cks0) / CYCLES);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
