// tb_gated_counter -- self-checking test of the counter with gated flip-flops.
//
// Two counters run from one 50 MHz, 50% duty-cycle clock: the default 8 bit
// counter and a 16 bit one, both with conventional flip-flops on bits 0-2.
// The counters have no reset, so the value after the first clock cycle is
// taken as the start. From then on, after every falling edge the test checks
// that each count has advanced by exactly one (modulo 2^WIDTH), and that it
// does not change during the rest of the cycle. The run is long enough for
// both counters to wrap around.
//
// Clock gating is checked per bit: for each gated bit k, the master and
// slave clock nodes must pulse exactly once per toggle of bit k. A toggle
// happens once every 2^k cycles, so the gated clock activity equals the
// bit's data activity. For the conventional bits the clock nodes must be ck
// itself. The test reports the measured activity per bit.
module tb_gated_counter;
  timeunit 1ns;
  timeprecision 1ns;

  localparam int TCK    = 20;
  localparam int W8     = 8;
  localparam int W16    = 16;
  localparam int N_CONV = 3;
  localparam int CYCLES = (1 << W16) + 300;

  logic ck = 1'b1;
  logic [W8-1:0]  c8, ckm8, cks8, e8, p8;
  logic [W16-1:0] c16, ckm16, cks16, e16, p16;
  int   checks = 0, failures = 0;
  int   n_wrap8 = 0, n_wrap16 = 0;
  int   pm8[W8], ps8[W8], tg8[W8];
  int   pm16[W16], ps16[W16], tg16[W16];

  gated_counter dut8 (.ck(ck), .count(c8), .ckm(ckm8), .cks(cks8));
  gated_counter #(.WIDTH(W16), .N_CONV(N_CONV)) dut16 (
    .ck(ck), .count(c16), .ckm(ckm16), .cks(cks16)
  );

  for (genvar k = 0; k < W8; k++) begin : g_mon8
    always @(posedge ckm8[k]) pm8[k]++;
    always @(negedge cks8[k]) ps8[k]++;
  end
  for (genvar k = 0; k < W16; k++) begin : g_mon16
    always @(posedge ckm16[k]) pm16[k]++;
    always @(negedge cks16[k]) ps16[k]++;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
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
    // Settling cycle: the power-up contents become the start value.
    #(TCK / 2);
    ck = 1'b0;
    #(TCK / 2);
    e8  = c8;
    e16 = c16;
    foreach (pm8[k])  begin pm8[k] = 0;  ps8[k] = 0;  tg8[k] = 0;  end
    foreach (pm16[k]) begin pm16[k] = 0; ps16[k] = 0; tg16[k] = 0; end
    for (int n = 0; n < CYCLES; n++) begin
      ck = 1'b1;
      #1;
      check(ckm8[N_CONV-1:0] == '1 && cks8[N_CONV-1:0] == '1,
            "8 bit conventional bits see ck high");
      #(TCK / 2 - 1);
      p8  = e8;
      p16 = e16;
      e8  = e8 + 1'b1;
      e16 = e16 + 1'b1;
      if (e8 == '0) n_wrap8++;
      if (e16 == '0) n_wrap16++;
      for (int k = 0; k < W8; k++)  if (e8[k] != p8[k])   tg8[k]++;
      for (int k = 0; k < W16; k++) if (e16[k] != p16[k]) tg16[k]++;
      ck = 1'b0;
      #1;
      check(c8 == e8, $sformatf("8 bit count %0d expected %0d", c8, e8));
      check(c16 == e16, $sformatf("16 bit count %0d expected %0d", c16, e16));
      check(ckm8[W8-1:N_CONV] == '0 && cks8[W8-1:N_CONV] == '1,
            "8 bit gated clock nodes idle");
      check(ckm16[W16-1:N_CONV] == '0 && cks16[W16-1:N_CONV] == '1,
            "16 bit gated clock nodes idle");
      #(TCK / 2 - 1);
      check(c8 == e8 && c16 == e16, "counts held through low phase");
    end
    for (int k = N_CONV; k < W8; k++) begin
      check(pm8[k] == tg8[k] && ps8[k] == tg8[k],
            $sformatf("8 bit, bit %0d: clock pulses %0d/%0d, toggles %0d",
                      k, pm8[k], ps8[k], tg8[k]));
    end
    for (int k = 0; k < W16; k++) begin
      if (k >= N_CONV)
        check(pm16[k] == tg16[k] && ps16[k] == tg16[k],
              $sformatf("16 bit, bit %0d: clock pulses %0d/%0d, toggles %0d",
                        k, pm16[k], ps16[k], tg16[k]));
      $display("16 bit counter, bit %2d: %s, D activity %8.6f, master clock pulses per cycle %8.6f",
               k, k < N_CONV ? "conventional" : "gated       ",
               real'(tg16[k]) / CYCLES,
               k < N_CONV ? 1.0 : real'(pm16[k]) / CYCLES);
    end
    check(n_wrap8 > 0, "8 bit counter wrapped");
    check(n_wrap16 > 0, "16 bit counter wrapped");
    $display("wraps: 8 bit %0d, 16 bit %0d", n_wrap8, n_wrap16);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
