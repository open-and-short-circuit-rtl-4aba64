// tb_fd_top: end-to-end test of the controller and fault diagnosis in closed
// loop with a behavioural boost converter (boost_plant), all parameters of
// fd_top at their defaults.
//
// Scenarios, each from reset with the converter preset near its operating
// point and SETTLE clocks of healthy closed-loop operation first:
//   1. healthy, D about 50 %: no fault may be flagged; the short FD1 error
//      pulses caused by the converter's delays must occur and be tolerated.
//   2. open-circuit switch, D about 50 %: FD1 must flag within 2 switching
//      periods, FD2 within 2 switching periods.
//   3. short-circuit switch, D about 50 %: the same.
//   4. open-circuit switch, small D (about 20 %): FD2 must flag within 2
//      switching periods, before FD1 (the on-time is shorter than N T_c).
//   5. short-circuit switch, large D (about 80 %, 250 V into a 500 ohm load,
//      since 250 V into 50 ohm is beyond the current limit): FD2 flags within
//      2 periods, before FD1 (the off-time is shorter than N T_c).
// Every mechanism is counted; one that never happened counts as a failure.
`timescale 1ns/1ps
module tb_fd_top;
  import fd_pkg::*;

  localparam int unsigned TP     = 67;     // switching period in clocks
  localparam int unsigned SETTLE = 60000;  // clocks of healthy operation
  localparam int unsigned WATCH  = 3000;   // clocks observed after a fault

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
  int n_delay_error = 0, n_fd1 = 0, n_fd2 = 0, n_ocf = 0, n_scf = 0;
  int n_fd2_first = 0, n_fd1_first = 0, n_trig = 0, n_state_visit[4];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // count short error pulses (error that ends before detection)
  logic err_d;
  always @(posedge clk) begin
    err_d <= fd1_error;
    if (rst_n && err_d && !fd1_error && !fd1_out) n_delay_error++;
    if (rst_n && trig) n_trig++;
    if (rst_n) n_state_visit[fd2_state]++;
  end

  // run one scenario; returns detection times in clocks (-1 = none)
  task automatic scenario(real vref, real rload, logic [1:0] mode, output int t1, output int t2,
                          output real d_avg);
    int unsigned acc;
    fault_mode = 2'd0;
    rst_n = 1'b0;
    v_oref = voltage_t'($rtoi(vref * 64.0));
    plant.set_state(vref, rload);
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    acc = 0;
    for (int k = 0; k < SETTLE; k++) begin
      @(posedge clk);
      if (k >= SETTLE - 10*TP) acc += duty;
    end
    d_avg = real'(acc) / (10.0 * TP) / 65536.0;
    check(!fault, $sformatf("no false alarm before fault, vref %0.1f", vref));
    // fault at the start of the on-time plus a few clocks
    @(posedge clk iff trig);
    repeat (4) @(posedge clk);
    #1 fault_mode = mode;
    t1 = -1; t2 = -1;
    for (int k = 1; k <= WATCH; k++) begin
      @(posedge clk); #1;
      if (t1 < 0 && fd1_out) t1 = k;
      if (t2 < 0 && fd2_out) t2 = k;
      check(fault == (fd1_out | fd2_out), "fault is FD1 or FD2");
    end
  endtask

  initial begin : watchdog
    repeat (7 * (SETTLE + WATCH + 200)) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t1, t2;
    real d;
    v_oref = '0;

    // 1. healthy operation
    scenario(100.0, 50.0, 2'd0, t1, t2, d);
    $display("healthy: D=%0.3f fd1=%0d fd2=%0d i_l=%0.2f", d, t1, t2, real'(i_l)/256.0);
    check(t1 < 0 && t2 < 0, "healthy converter: no detection");
    check(d > 0.35 && d < 0.65, "healthy converter near D = 0.5");
    check(v_o > voltage_t'(90*64) && v_o < voltage_t'(110*64), "output voltage regulated");

    // 2. OCF, D near 50 %
    scenario(100.0, 50.0, 2'd1, t1, t2, d);
    $display("OCF  D=%0.3f: FD1 %0d us, FD2 %0d us", d, t1, t2);
    n_ocf++;
    check(t1 > 0 && t1 <= 2*TP, "OCF D~0.5: FD1 detects within 2 periods");
    check(t2 > 0 && t2 <= 2*TP, "OCF D~0.5: FD2 detects within 2 periods");
    if (t1 > 0) n_fd1++;
    if (t2 > 0) n_fd2++;
    if (t1 > 0 && (t2 < 0 || t1 < t2)) n_fd1_first++;

    // 3. SCF, D near 50 %
    scenario(100.0, 50.0, 2'd2, t1, t2, d);
    $display("SCF  D=%0.3f: FD1 %0d us, FD2 %0d us", d, t1, t2);
    n_scf++;
    check(t1 > 0 && t1 <= 2*TP, "SCF D~0.5: FD1 detects within 2 periods");
    check(t2 > 0 && t2 <= 2*TP, "SCF D~0.5: FD2 detects within 2 periods");
    if (t1 > 0) n_fd1++;
    if (t2 > 0) n_fd2++;
    if (t1 > 0 && (t2 < 0 || t1 < t2)) n_fd1_first++;

    // 4. OCF, small D
    scenario(62.5, 50.0, 2'd1, t1, t2, d);
    $display("OCF  D=%0.3f: FD1 %0d us, FD2 %0d us", d, t1, t2);
    n_ocf++;
    check(d < 0.30, "small-D case runs with D below N T_c / T_s");
    check(t2 > 0 && t2 <= 2*TP, "OCF small D: FD2 detects within 2 periods");
    check(t1 < 0 || t1 > t2, "OCF small D: FD2 is first");
    if (t2 > 0) n_fd2++;
    if (t2 > 0 && (t1 < 0 || t2 < t1)) n_fd2_first++;

    // 5. SCF, large D
    scenario(250.0, 500.0, 2'd2, t1, t2, d);
    $display("SCF  D=%0.3f: FD1 %0d us, FD2 %0d us", d, t1, t2);
    n_scf++;
    check(d > 0.70, "large-D case runs with (1-D) T_s below N T_c");
    check(t2 > 0 && t2 <= 2*TP, "SCF large D: FD2 detects within 2 periods");
    check(t1 < 0 || t1 > t2, "SCF large D: FD2 is first");
    if (t2 > 0) n_fd2++;
    if (t2 > 0 && (t1 < 0 || t2 < t1)) n_fd2_first++;

    $display("mechanisms: delay-error pulses %0d, FD1 detections %0d, FD2 detections %0d, FD1 first %0d, FD2 first %0d, OCF %0d, SCF %0d, trig %0d",
             n_delay_error, n_fd1, n_fd2, n_fd1_first, n_fd2_first, n_ocf, n_scf, n_trig);
    $display("FD2 state samples: S0 %0d S1 %0d S2 %0d S3 %0d",
             n_state_visit[0], n_state_visit[1], n_state_visit[2], n_state_visit[3]);
    check(n_delay_error > 0, "tolerated delay-error pulses occurred");
    check(n_fd1 > 0 && n_fd2 > 0, "both detectors fired");
    check(n_fd1_first > 0 && n_fd2_first > 0, "each detector was first at least once");
    check(n_ocf > 0 && n_scf > 0, "both fault types injected");
    for (int s = 0; s < 4; s++) check(n_state_visit[s] > 0, $sformatf("FD2 state S%0d visited", s));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
