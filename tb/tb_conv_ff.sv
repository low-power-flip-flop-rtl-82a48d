// tb_conv_ff -- self-checking test of the conventional master-slave flip-flop.
//
// Same stimulus style as the gated flip-flop's test: a 50 MHz clock with
// 50% duty cycle, and D changing at random moments in both clock phases,
// glitches included, but never within 1 ns of the falling edge. The
// reference samples D at each falling edge. Checks: Q equals the sample
// after the edge and holds through the cycle, and Q never changes away from
// a falling edge. The test also counts cycles that change Q and cycles that
// do not, and checks that both occurred.
module tb_conv_ff;
  timeunit 1ns;
  timeprecision 1ns;

  localparam int TCK = 20;  // 50 MHz

  logic ck = 1'b1;
  logic d  = 1'b0;
  logic q, q_exp;
  logic edge_now = 1'b1;
  int   checks = 0, failures = 0, n_capture = 0, n_idle = 0;

  conv_ff dut (.ck(ck), .d(d), .q(q));

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b at %0t", what, got, exp, $time);
    end
  endtask

  always @(q) begin
    if (!edge_now) begin
      failures++;
      $display("FAIL q changed away from a falling clock edge at %0t", $time);
    end
  end

  initial begin : watchdog
    #(TCK * 5000);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // First cycle settles the random power-up state.
    #(TCK / 2);
    ck = 1'b0;
    #(TCK / 2);
    edge_now = 1'b0;
    for (int n = 0; n < 3000; n++) begin
      int t;
      ck = 1'b1;
      // up to three D changes in the high phase, before 9 ns
      t = 0;
      for (int i = $urandom_range(0, 3); i > 0; i--) begin
        int dt;
        dt = $urandom_range(1, 3);
        if (t + dt > TCK / 2 - 1) break;
        #(dt);
        t += dt;
        d = ~d;
      end
      #(TCK / 2 - t);
      q_exp = d;
      if (q_exp != q) n_capture++; else n_idle++;
      edge_now = 1'b1;
      ck = 1'b0;
      #1;
      edge_now = 1'b0;
      check(q, q_exp, "q after falling edge");
      t = 1;
      for (int i = $urandom_range(0, 3); i > 0; i--) begin
        int dt;
        dt = $urandom_range(1, 3);
        if (t + dt > TCK / 2 - 1) break;
        #(dt);
        t += dt;
        d = ~d;
      end
      #(TCK / 2 - t);
      check(q, q_exp, "q held through low phase");
    end
    if (n_capture == 0 || n_idle == 0) begin
      failures++;
      $display("FAIL coverage: capture %0d idle %0d", n_capture, n_idle);
    end
    $display("cycles with Q change %0d, without %0d", n_capture, n_idle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
