// tb_boost_ctrl: closed-loop test of the cascade control with the behavioural
// boost converter (50 V in, 50 ohm load). Starting at 100 V, the voltage
// reference steps to 120 V: the output must settle within +-3 V, the duty
// cycle must approach the boost ratio 1 - 50/120, i_Lref must stay in its
// limits, and q must pulse once in every 67-clock period (the duty cycle never
// falls below its 0.15 floor).
`timescale 1ns/1ps
module tb_boost_ctrl;
  import fd_pkg::*;
  localparam int TP = 67;
  logic clk = 1'b0, rst_n = 1'b0;
  always #500 clk = ~clk;
  voltage_t v_oref, v_o;
  current_t i_l, i_lref;
  duty_t duty;
  energy_t e_o, e_oref;
  logic q, period_start, sw_on;
  int checks = 0, failures = 0;

  boost_ctrl dut (.clk, .rst_n, .v_oref, .v_o, .i_l, .q, .duty, .i_lref, .e_o, .e_oref,
                  .period_start);
  boost_plant plant (.clk, .gate(q), .fault_mode(2'd0), .i_l, .v_o, .switch_on(sw_on));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real d_avg, vo;
    int last_start, n_starts, q_rise;
    bit q_d;
    v_oref = voltage_t'(100 * 64);
    plant.set_state(100.0, 50.0);
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (50000) @(posedge clk);
    vo = real'(v_o) / 64.0;
    $display("at 100 V ref: v_o %0.2f V, D %0.3f", vo, real'(duty) / 65536.0);
    check(vo > 97.0 && vo < 103.0, "regulates 100 V");
    v_oref = voltage_t'(120 * 64);
    last_start = -1; n_starts = 0; q_rise = 0; q_d = 0;
    for (int n = 0; n < 250000; n++) begin
      @(posedge clk); #1;
      if (period_start) begin
        if (last_start >= 0) check(n - last_start == TP, "switching period 67 clocks");
        last_start = n; n_starts++;
      end
      if (q && !q_d) q_rise++;
      q_d = q;
      check(i_lref >= 0 && i_lref <= current_t'(40 * 256), "i_Lref within limits");
    end
    d_avg = 0.0;
    for (int n = 0; n < 10 * TP; n++) begin
      @(posedge clk); d_avg += real'(duty) / 65536.0;
    end
    d_avg /= 10.0 * TP;
    vo = real'(v_o) / 64.0;
    $display("after step to 120 V: v_o %0.2f V, D %0.3f, periods %0d, q pulses %0d",
             vo, d_avg, n_starts, q_rise);
    check(vo > 117.0 && vo < 123.0, "settles at 120 V");
    check(d_avg > 0.50 && d_avg < 0.66, "duty near 1 - 50/120");
    check(q_rise >= n_starts - 1 && q_rise <= n_starts + 1, "one q pulse per period");
    check(e_oref > e_o - 24'd4096 && e_oref < e_o + 24'd4096, "energy error below 1 J");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
