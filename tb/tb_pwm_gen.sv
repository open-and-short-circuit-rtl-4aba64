// tb_pwm_gen: checks the PWM with PERIOD = 67 clocks. Each period must last
// 67 clocks, start with period_start, and hold q = 1 for exactly the first
// round(duty * 67) clocks, duty being the value present at the clock edge on
// which the previous period ended. Duty changes at random clocks, mid-period
// included, and covers 0 and full scale.
`timescale 1ns/1ps
module tb_pwm_gen;
  localparam int TP = 67;
  logic clk = 1'b0, rst_n = 1'b0;
  always #500 clk = ~clk;
  logic [15:0] duty = '0;
  logic q, period_start;
  logic [$clog2(TP+1)-1:0] carrier;
  int checks = 0, failures = 0;

  pwm_gen #(.PERIOD(TP), .D_W(16)) dut (.clk, .rst_n, .duty, .q, .period_start, .carrier);

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int on_clk, pos, periods, n_full, n_zero;
    on_clk = 0; pos = 0; periods = 0; n_full = 0; n_zero = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    // first period after reset: duty register is zero
    for (int n = 0; n < 600 * TP; n++) begin
      #1;
      // expected q in this clock
      checks++;
      if (q != (pos < on_clk) || period_start != (pos == 0)) begin
        failures++;
        if (failures < 10) $display("FAIL n=%0d pos=%0d q=%0d expected on %0d", n, pos, q, on_clk);
      end
      if ($urandom_range(99) < 3) begin
        case ($urandom_range(9))
          0: duty = '0;
          1: duty = '1;
          default: duty = 16'($urandom_range(65535));
        endcase
      end
      #1;
      @(posedge clk);
      if (pos == TP - 1) begin
        on_clk = (int'(duty) * TP + 32768) >>> 16;
        if (on_clk == 0) n_zero++;
        if (on_clk == TP) n_full++;
        pos = 0;
        periods++;
      end else pos++;
      @(negedge clk);
    end
    $display("periods %0d, full-on %0d, off %0d", periods, n_full, n_zero);
    checks++;
    if (n_full == 0 || n_zero == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
