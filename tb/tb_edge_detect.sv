// tb_edge_detect: drives a random q and checks that trig is high exactly in
// the clocks where q is 1 and was 0 at the previous clock edge, and that a
// PWM-like q yields one trig per period.
`timescale 1ns/1ps
module tb_edge_detect;
  logic clk = 1'b0, rst_n = 1'b0;
  always #500 clk = ~clk;
  logic q = 1'b0, trig;
  int checks = 0, failures = 0;

  edge_detect dut (.clk, .rst_n, .q, .trig);

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit q_prev;
    int ntrig;
    q_prev = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int n = 0; n < 2000; n++) begin
      q = 1'($urandom_range(1));
      #1;
      checks++;
      if (trig !== (q & ~q_prev)) begin
        failures++;
        $display("FAIL n=%0d q=%0d prev=%0d trig=%0d", n, q, q_prev, trig);
      end
      @(posedge clk);
      q_prev = q;
      @(negedge clk);
    end
    // 20 periods of 67 clocks with 30 clocks high: 20 trig pulses
    ntrig = 0;
    for (int n = 0; n < 20*67; n++) begin
      q = ((n % 67) < 30);
      #1;
      if (trig) ntrig++;
      @(negedge clk);
    end
    checks++;
    if (ntrig != 20 - (q_prev ? 1 : 0) && ntrig != 20) failures++;
    $display("pwm trig pulses %0d", ntrig);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
