// tb_fd_experiments: the converter test cases of the reference hardware,
// re-run on fd_top (default parameters) with the behavioural converter.
//   A. voltage-reference step 100 V -> 110 V, then 60 ms later an open switch:
//      no alarm during the step transient, detection after the fault;
//   B. open switch, D about 40 % (83 V out): FD1 first, within two periods;
//   C. open switch, D about 20 % (62.5 V out): FD2 first, within two periods,
//      FD1 only later, once the controller has raised D;
//   D. short switch, D about 60 % (125 V out): FD1 first, within two periods;
//   E. short switch, D about 80 % (250 V, 500 ohm): FD2 first, FD1 later.
// Detection times are printed in microseconds (one clock = 1 us).
`timescale 1ns/1ps
module tb_fd_experiments;
  import fd_pkg::*;

  localparam int unsigned TP     = 67;
  localparam int unsigned SETTLE = 60000;
  localparam int unsigned WATCH  = 4000;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #500 clk = ~clk;

  voltage_t v_oref, v_o;
  current_t i_l, i_lref;
  duty_t    duty;
  logic q, fault, fd1_out, fd2_out, sgn_pos, fd1_error, trig, sw_on;
  logic [$clog2(22)-1:0] fd1_count;
  fd2_state_e fd2_state;
  logic [1:0] fault_mode = 2'd0;

  fd_top dut (
    .clk, .rst_n, .v_oref, .v_o, .i_l, .q, .duty, .i_lref, .fault, .fd1_out,
    .fd2_out, .sgn_pos, .fd1_error, .fd1_count, .trig, .fd2_state
  );

  boost_plant plant (
    .clk, .gate(q), .fault_mode, .i_l, .v_o, .switch_on(sw_on)
  );

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic start(real vref, real rload);
    fault_mode = 2'd0;
    rst_n = 1'b0;
    v_oref = voltage_t'($rtoi(vref * 64.0));
    plant.set_state(vref, rload);
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
  endtask

  task automatic run_healthy(int clocks, output real d_avg);
    real acc;
    acc = 0.0;
    for (int k = 0; k < clocks; k++) begin
      @(posedge clk);
      if (k >= clocks - 10*TP) acc += real'(duty) / 65536.0;
      check(!fault, "no alarm while healthy");
    end
    d_avg = acc / (10.0 * TP);
  endtask

  task automatic inject(logic [1:0] mode, output int t1, output int t2);
    @(posedge clk iff trig);
    repeat (4) @(posedge clk);
    #1 fault_mode = mode;
    t1 = -1; t2 = -1;
    for (int k = 1; k <= WATCH; k++) begin
      @(posedge clk); #1;
      if (t1 < 0 && fd1_out) t1 = k;
      if (t2 < 0 && fd2_out) t2 = k;
    end
  endtask

  initial begin : watchdog
    repeat (8 * (SETTLE + WATCH + 200)) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t1, t2;
    real d;
    v_oref = '0;

    // A. reference step, then an open switch 60 ms later
    start(100.0, 50.0);
    run_healthy(SETTLE, d);
    v_oref = voltage_t'(110 * 64);
    run_healthy(60000, d);
    $display("A: after 100->110 V step: v_o %0.1f V, D %0.3f", real'(v_o) / 64.0, d);
    check(v_o > voltage_t'(106*64) && v_o < voltage_t'(114*64), "A: follows the reference step");
    inject(2'd1, t1, t2);
    $display("A: OCF D=%0.2f  FD1 %0d us  FD2 %0d us", d, t1, t2);
    check(t1 > 0 && t2 > 0 && fault, "A: both detectors flag the open switch");

    // B. OCF at D about 40 %
    start(83.3, 50.0);
    run_healthy(SETTLE, d);
    inject(2'd1, t1, t2);
    $display("B: OCF D=%0.2f  FD1 %0d us  FD2 %0d us", d, t1, t2);
    check(d > 0.32 && d < 0.48, "B: D about 40 %");
    check(t1 > 0 && t1 <= 2*TP && t2 > 0 && t2 <= 2*TP, "B: both within two periods");
    check(t1 < t2, "B: FD1 first");

    // C. OCF at D about 20 %
    start(62.5, 50.0);
    run_healthy(SETTLE, d);
    inject(2'd1, t1, t2);
    $display("C: OCF D=%0.2f  FD1 %0d us  FD2 %0d us", d, t1, t2);
    check(d < 0.28, "C: D about 20 %");
    check(t2 > 0 && t2 <= 2*TP, "C: FD2 within two periods");
    check(t1 > t2, "C: FD1 only after the controller raised D");

    // D. SCF at D about 60 %
    start(125.0, 50.0);
    run_healthy(SETTLE, d);
    inject(2'd2, t1, t2);
    $display("D: SCF D=%0.2f  FD1 %0d us  FD2 %0d us", d, t1, t2);
    check(d > 0.52 && d < 0.68, "D: D about 60 %");
    check(t1 > 0 && t1 <= 2*TP && t2 > 0 && t2 <= 2*TP, "D: both within two periods");
    check(t1 <= t2, "D: FD1 first");

    // E. SCF at D about 80 %
    start(250.0, 500.0);
    run_healthy(SETTLE, d);
    inject(2'd2, t1, t2);
    $display("E: SCF D=%0.2f  FD1 %0d us  FD2 %0d us", d, t1, t2);
    check(d > 0.72, "E: D about 80 %");
    check(t2 > 0 && t2 <= 2*TP, "E: FD2 within two periods");
    check(t1 > t2, "E: FD1 only after the controller lowered D");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
