// tb_energy_calc: compares e = 0.5 C v^2 (C = 2200 uF) with a real-number
// computation for random and corner voltages, one clock after the input.
`timescale 1ns/1ps
module tb_energy_calc;
  import fd_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #500 clk = ~clk;
  voltage_t v = '0;
  energy_t  e;
  int checks = 0, failures = 0;

  energy_calc dut (.clk, .rst_n, .v, .e);

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real vr, er;
    int exp_q;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int n = 0; n < 3000; n++) begin
      case (n)
        0: v = '0;
        1: v = voltage_t'(100 * 64);     // 100 V -> 11 J
        2: v = voltage_t'(250 * 64);
        3: v = '1;
        default: v = voltage_t'($urandom_range(65535));
      endcase
      vr = real'(v) / 64.0;
      er = 0.5 * 2200.0e-6 * vr * vr;
      exp_q = $rtoi(er * 4096.0);
      @(posedge clk); #1;
      checks++;
      if (e - exp_q > 1 || exp_q - e > 1) begin
        failures++;
        $display("FAIL v=%0.3f V e=%0d expected %0d", vr, e, exp_q);
      end
      if (n == 1 && (e < 45050 || e > 45070)) begin
        failures++; $display("FAIL 100 V should give 11 J");
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
