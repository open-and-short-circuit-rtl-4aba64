// tb_pi_ctrl: checks both PI configurations used by the converter control
// against a real-number model of out = sat(KP*err + KI*TS*sum(err)) with the
// same conditional-integration anti-windup:
//  - energy loop: energy in, i_Lref out (KP 22.5, KI 112.5, 0..40 A);
//  - current loop: current in, duty out (KP 0.0895, KI 0.8953, 0.15..0.85).
// Errors are random walks with jumps that drive the output into both limits;
// the tolerance allows for fixed-point rounding of the gains.
`timescale 1ns/1ps
module tb_pi_ctrl;
  logic clk = 1'b0, rst_n = 1'b0;
  always #500 clk = ~clk;
  int checks = 0, failures = 0;

  logic signed [23:0] e_ref = '0, e_meas = '0;
  logic signed [15:0] i_ref_out;
  logic signed [15:0] i_ref = '0, i_meas = '0;
  logic signed [17:0] d_out;

  pi_ctrl #(.IN_W(24), .IN_FRAC(12), .OUT_W(16), .OUT_FRAC(8), .KP(22.5), .KI(112.5),
            .TS(1.0e-6), .OUT_MIN(0.0), .OUT_MAX(40.0))
    dut_e (.clk, .rst_n, .ref_in(e_ref), .meas(e_meas), .out(i_ref_out));
  pi_ctrl #(.IN_W(16), .IN_FRAC(8), .OUT_W(18), .OUT_FRAC(16), .KP(0.0895), .KI(0.8953),
            .TS(1.0e-6), .OUT_MIN(0.15), .OUT_MAX(0.85))
    dut_i (.clk, .rst_n, .ref_in(i_ref), .meas(i_meas), .out(d_out));

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one model step: returns output (physical units), updates integrator
  function automatic real step(real err, real kp, real kit, real lo, real hi, ref real acc,
                               output bit at_hi, output bit at_lo);
    real s;
    s = kp * err + acc;
    at_hi = s > hi;
    at_lo = s < lo;
    if (!(at_hi && err > 0) && !(at_lo && err < 0)) acc += kit * err;
    if (acc > hi) acc = hi;
    if (acc < lo) acc = lo;
    return at_hi ? hi : (at_lo ? lo : s);
  endfunction

  initial begin
    real acc_e, acc_i, me, mi, err_e, err_i, tol_e, tol_i;
    bit h, l;
    int n_hi_e, n_lo_e, n_hi_i, n_lo_i;
    int ee, ii;
    acc_e = 0; acc_i = 0; n_hi_e = 0; n_lo_e = 0; n_hi_i = 0; n_lo_i = 0;
    ee = 0; ii = 0;
    tol_e = 0.02 + 0.003 * 40.0;   // amperes
    tol_i = 0.0005 + 0.003 * 0.85; // duty
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int n = 0; n < 40000; n++) begin
      // energy error in 1/4096 J, current error in 1/256 A
      if ($urandom_range(999) == 0) ee = int'($urandom_range(24000)) - 12000;
      else ee += int'($urandom_range(20)) - 10;
      if ($urandom_range(999) == 0) ii = int'($urandom_range(4000)) - 1000;
      else ii += int'($urandom_range(6)) - 3;
      if (ee > 20000) ee = 20000;
      if (ee < -20000) ee = -20000;
      if (ii > 8000) ii = 8000;
      if (ii < -8000) ii = -8000;
      e_meas = 24'(45000); e_ref = 24'(45000 + ee);
      i_meas = 16'(1024);  i_ref = 16'(1024 + ii);
      err_e = real'(ee) / 4096.0;
      err_i = real'(ii) / 256.0;
      me = step(err_e, 22.5, 112.5e-6, 0.0, 40.0, acc_e, h, l);
      if (h) n_hi_e++;
      if (l) n_lo_e++;
      mi = step(err_i, 0.0895, 0.8953e-6, 0.15, 0.85, acc_i, h, l);
      if (h) n_hi_i++;
      if (l) n_lo_i++;
      @(posedge clk); #1;
      checks += 2;
      if ((real'(i_ref_out) / 256.0 - me) > tol_e || (me - real'(i_ref_out) / 256.0) > tol_e) begin
        failures++;
        if (failures < 10) $display("FAIL energy PI n=%0d out %0.4f model %0.4f", n, real'(i_ref_out)/256.0, me);
      end
      if ((real'(d_out) / 65536.0 - mi) > tol_i || (mi - real'(d_out) / 65536.0) > tol_i) begin
        failures++;
        if (failures < 10) $display("FAIL current PI n=%0d out %0.5f model %0.5f", n, real'(d_out)/65536.0, mi);
      end
      @(negedge clk);
    end
    $display("limits reached: i_Lref hi %0d lo %0d, D hi %0d lo %0d", n_hi_e, n_lo_e, n_hi_i, n_lo_i);
    checks++;
    if (n_hi_e == 0 || n_lo_e == 0 || n_hi_i == 0 || n_lo_i == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
