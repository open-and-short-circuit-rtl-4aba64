// tb_fault_diag: checks the complete diagnosis (slope sign, FD1, FD2, OR) on
// a synthetic inductor current. The testbench makes its own 67-clock PWM
// command q and a triangular i_L that follows q after DLY clocks (healthy),
// or only falls (open switch) or only rises (shorted switch) after the fault.
//  - healthy at D = 20 %, 50 %, 80 %: no fault in 40 periods;
//  - D = 50 %, OCF and SCF: FD1 flags within N+1+LAG+DLY+2 clocks of the
//    fault, FD2 within two periods, fault = FD1_out | FD2_out;
//  - D = 50 %, open switch struck at every clock of a period: FD1 always
//    within T_s + (N-1) T_c plus the sensing delay (the worst case of the
//    method), FD2 always within two periods;
//  - D = 20 % OCF and D = 80 % SCF: FD1 cannot flag (on- or off-time shorter
//    than N T_c) but FD2 flags within two periods.
`timescale 1ns/1ps
module tb_fault_diag;
  import fd_pkg::*;
  localparam int TP = 67, DLY = 3, N = 20, LAG = 5;
  logic clk = 1'b0, rst_n = 1'b0;
  always #500 clk = ~clk;
  current_t i_l;
  logic q = 1'b0;
  logic fault, fd1_out, fd2_out, sgn_pos, error, fd1_detect, trig;
  logic [$clog2(N+2)-1:0] fd1_count;
  fd2_state_e fd2_state;
  int checks = 0, failures = 0;

  fault_diag #(.N(N), .LAG(LAG)) dut (.clk, .rst_n, .i_l, .q, .fault, .fd1_out, .fd2_out,
    .sgn_pos, .error, .fd1_count, .fd1_detect, .trig, .fd2_state);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // d: on-clocks per period; mode 0/1/2 healthy/OCF/SCF from clock fault_at
  task automatic run(int d, int periods, int mode, int fault_at,
                     output int t1, output int t2);
    int x, n;
    logic [DLY-1:0] qp;
    int up, down;
    up = 8 * (TP - d); down = 8 * d;   // balanced triangle, LSB per clock
    x = 4 * 256 * 8; qp = '0; n = 0; t1 = -1; t2 = -1;
    rst_n = 1'b0; q = 0;
    @(negedge clk); rst_n = 1'b1;
    for (int p = 0; p < periods; p++) begin
      for (int c = 0; c < TP; c++) begin
        q = (c < d);
        qp = {qp[DLY-2:0], q};
        if (mode == 1 && n >= fault_at)      x -= 8 * 30;
        else if (mode == 2 && n >= fault_at) x += 8 * 30;
        else x += qp[DLY-1] ? up : -down;
        if (x < 0) x = 0;
        i_l = current_t'(x / 8);
        @(posedge clk); #1;
        n++;
        check(fault == (fd1_out | fd2_out), "fault = FD1 | FD2");
        if (n > fault_at && t1 < 0 && fd1_out) t1 = n - fault_at;
        if (n > fault_at && t2 < 0 && fd2_out) t2 = n - fault_at;
        @(negedge clk);
      end
    end
  endtask

  initial begin
    int t1, t2;
    int lim1;
    lim1 = N + 1 + LAG + DLY + 2;
    repeat (2) @(posedge clk);
    run(13, 40, 0, 0, t1, t2); check(t1 < 0 && t2 < 0 && !fault, "healthy D=0.2");
    run(34, 40, 0, 0, t1, t2); check(t1 < 0 && t2 < 0 && !fault, "healthy D=0.5");
    run(54, 40, 0, 0, t1, t2); check(t1 < 0 && t2 < 0 && !fault, "healthy D=0.8");
    // OCF / SCF at D = 0.5, fault shortly after the start of on / off time
    run(34, 6, 1, 3*TP + 2, t1, t2);
    $display("OCF D=0.5: FD1 %0d, FD2 %0d clocks", t1, t2);
    check(t1 > 0 && t1 <= lim1, "OCF D=0.5: FD1 fast");
    check(t2 > 0 && t2 <= 2*TP, "OCF D=0.5: FD2 within 2 periods");
    run(34, 6, 2, 3*TP + 36, t1, t2);
    $display("SCF D=0.5: FD1 %0d, FD2 %0d clocks", t1, t2);
    check(t1 > 0 && t1 <= lim1, "SCF D=0.5: FD1 fast");
    check(t2 > 0 && t2 <= 2*TP, "SCF D=0.5: FD2 within 2 periods");
    // sweep of the fault instant over one period, D = 0.5
    begin
      int w1, w2;
      w1 = 0; w2 = 0;
      for (int f = 0; f < TP; f++) begin
        run(34, 7, 1, 3*TP + f, t1, t2);
        check(t1 > 0 && t1 <= TP + (N - 1) + LAG + DLY + 2, $sformatf("OCF at +%0d: FD1 in %0d", f, t1));
        check(t2 > 0 && t2 <= 2*TP, $sformatf("OCF at +%0d: FD2 in %0d", f, t2));
        if (t1 > w1) w1 = t1;
        if (t2 > w2) w2 = t2;
      end
      $display("OCF sweep D=0.5: worst FD1 %0d, worst FD2 %0d clocks", w1, w2);
    end
    // FD1's blind spots
    run(13, 6, 1, 3*TP + 2, t1, t2);
    $display("OCF D=0.2: FD1 %0d, FD2 %0d clocks", t1, t2);
    check(t1 < 0, "OCF D=0.2: FD1 cannot flag");
    check(t2 > 0 && t2 <= 2*TP && fault, "OCF D=0.2: FD2 flags within 2 periods");
    run(54, 6, 2, 3*TP + 56, t1, t2);
    $display("SCF D=0.8: FD1 %0d, FD2 %0d clocks", t1, t2);
    check(t1 < 0, "SCF D=0.8: FD1 cannot flag");
    check(t2 > 0 && t2 <= 2*TP && fault, "SCF D=0.8: FD2 flags within 2 periods");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
