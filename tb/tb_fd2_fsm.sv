// tb_fd2_fsm: checks FD2 on switching patterns of 67-clock periods.
// The slope sign is the command delayed by DLY clocks (healthy converter),
// stuck at -1 (open switch) or stuck at +1 (shorted switch).
//  - healthy converter at duty 20 %, 50 % and 80 %: never S3, and S0, S1, S2
//    are all visited;
//  - a fault injected anywhere in a period is flagged within two periods;
//  - a random sequence is compared with a reference model of the diagram.
`timescale 1ns/1ps
module tb_fd2_fsm;
  import fd_pkg::*;
  localparam int TP = 67, DLY = 7;
  logic clk = 1'b0, rst_n = 1'b0;
  always #500 clk = ~clk;
  logic trig, q = 1'b0, q_d = 1'b0, sgn_pos = 1'b0;
  fd2_state_e state;
  logic fd2_out;
  int checks = 0, failures = 0;
  logic [DLY-1:0] qpipe = '0;

  fd2_fsm dut (.clk, .rst_n, .trig, .q, .sgn_pos, .state, .fd2_out);

  // Trig generated here, independently of edge_detect
  always_ff @(posedge clk) q_d <= q;
  assign trig = q & ~q_d;

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

  // run periods with duty d (in clocks); mode 0 healthy, 1 slope stuck -1,
  // 2 slope stuck +1 from clock fault_at on. Returns clocks to detection.
  task automatic run(int d, int periods, int mode, int fault_at, output int t_det,
                     output int visits[4]);
    int clk_n;
    t_det = -1; clk_n = 0;
    for (int s = 0; s < 4; s++) visits[s] = 0;
    rst_n = 1'b0; q = 0; qpipe = '0; sgn_pos = 0;
    @(negedge clk); rst_n = 1'b1;
    for (int p = 0; p < periods; p++) begin
      for (int c = 0; c < TP; c++) begin
        q = (c < d);
        qpipe = {qpipe[DLY-2:0], q};
        if (mode != 0 && clk_n >= fault_at) sgn_pos = (mode == 2);
        else sgn_pos = qpipe[DLY-1];
        @(posedge clk); #1;
        visits[state]++;
        clk_n++;
        if (t_det < 0 && fd2_out) t_det = clk_n - fault_at;
        @(negedge clk);
      end
    end
  endtask

  initial begin
    int t, v[4];
    int duties[3] = '{13, 34, 54};
    repeat (2) @(posedge clk);
    foreach (duties[i]) begin
      run(duties[i], 30, 0, 0, t, v);
      check(t < 0, $sformatf("healthy, duty %0d/67: no fault", duties[i]));
      check(v[0] > 0 && v[1] > 0 && v[2] > 0 && v[3] == 0, "healthy: S0,S1,S2 visited, S3 not");
      for (int f = 0; f < TP; f += 6) begin
        run(duties[i], 6, 1, 2*TP + f, t, v);
        check(t > 0 && t <= 2*TP, $sformatf("OCF duty %0d at +%0d: flagged in %0d clocks", duties[i], f, t));
        run(duties[i], 6, 2, 2*TP + f, t, v);
        check(t > 0 && t <= 2*TP, $sformatf("SCF duty %0d at +%0d: flagged in %0d clocks", duties[i], f, t));
      end
    end
    // random inputs against a model of the diagram
    begin
      fd2_state_e m;
      rst_n = 1'b0; @(negedge clk); rst_n = 1'b1;
      m = FD2_S0_OFF;
      for (int n = 0; n < 20000; n++) begin
        if ($urandom_range(99) < 10) q = ~q;
        sgn_pos = ($urandom_range(99) < 50);
        #1;
        case (m)
          FD2_S0_OFF:   if (trig) m = FD2_S1_CHECK;
          FD2_S1_CHECK: m = trig ? FD2_S3_FAULT : (sgn_pos ? FD2_S2_ON : m);
          FD2_S2_ON:    m = trig ? FD2_S3_FAULT : (!sgn_pos ? FD2_S0_OFF : m);
          default:      m = FD2_S3_FAULT;
        endcase
        @(posedge clk); #1;
        check(state == m && fd2_out == (m == FD2_S3_FAULT), $sformatf("model n=%0d", n));
        if (m == FD2_S3_FAULT && $urandom_range(99) < 5) begin
          rst_n = 1'b0; #1; rst_n = 1'b1; m = FD2_S0_OFF;
        end
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
