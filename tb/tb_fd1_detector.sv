// tb_fd1_detector: checks FD1 (N = 20).
//  - error is 1 exactly when the slope sign differs from the command;
//  - error runs of 1 .. N samples never raise a detection (tolerated delays);
//  - a run of N+1 samples raises fd1_detect on the (N+1)th clock edge and
//    fd1_out is set one clock later and stays set until reset;
//  - random runs against a reference counter model.
`timescale 1ns/1ps
module tb_fd1_detector;
  localparam int unsigned N = 20;
  logic clk = 1'b0, rst_n = 1'b0;
  always #500 clk = ~clk;
  logic q = 1'b0, sgn_pos = 1'b0;
  logic error, fd1_detect, fd1_out;
  logic [$clog2(N+2)-1:0] count;
  int checks = 0, failures = 0;

  fd1_detector #(.N(N)) dut (.clk, .rst_n, .q, .sgn_pos, .error, .count, .fd1_detect, .fd1_out);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic do_reset();
    rst_n = 1'b0;
    @(negedge clk);
    rst_n = 1'b1;
  endtask

  // hold a mismatch (q=1, slope -1) for len samples, then match again;
  // returns the number of clock edges until fd1_detect rose (0 = never)
  task automatic run_error(int len, output int t_det);
    t_det = 0;
    q = 1'b1; sgn_pos = 1'b0;
    for (int k = 1; k <= len; k++) begin
      #1 check(error == 1'b1, "error set on mismatch");
      @(posedge clk); #1;
      if (t_det == 0 && fd1_detect) t_det = k;
      @(negedge clk);
    end
    sgn_pos = 1'b1;
    #1 check(error == 1'b0, "error clear on match");
    @(negedge clk);
  endtask

  initial begin
    int t;
    int mcount;
    bit mout;
    repeat (2) @(posedge clk);
    do_reset();
    // both matching combinations give no error
    q = 1'b0; sgn_pos = 1'b0; #1 check(error == 1'b0, "q=0, slope -1: no error");
    q = 1'b1; sgn_pos = 1'b1; #1 check(error == 1'b0, "q=1, slope +1: no error");
    q = 1'b0; sgn_pos = 1'b1; #1 check(error == 1'b1, "q=0, slope +1: error");
    @(negedge clk);
    for (int len = 1; len <= N; len++) begin
      run_error(len, t);
      check(t == 0 && !fd1_out, $sformatf("run of %0d samples tolerated", len));
    end
    run_error(N + 5, t);
    check(t == N + 1, $sformatf("detection after N+1 samples (got %0d)", t));
    check(fd1_out, "fd1_out latched");
    repeat (10) @(negedge clk);
    check(fd1_out && !fd1_detect, "fd1_out holds after error ends");
    do_reset();
    check(!fd1_out, "reset clears fd1_out");
    // random against a model
    mcount = 0; mout = 0;
    for (int n = 0; n < 20000; n++) begin
      if ($urandom_range(99) < 4) q = ~q;
      if ($urandom_range(99) < ((sgn_pos != q) ? 4 : 20)) sgn_pos = q ^ 1'($urandom_range(1));
      @(posedge clk); #1;
      if (mcount > N) mout = 1;          // latch follows the comparator by one clock
      if (sgn_pos == q) mcount = 0;
      else if (mcount < N + 1) mcount++;
      check(count == mcount && fd1_detect == (mcount > N) && fd1_out == mout,
            $sformatf("model n=%0d count %0d/%0d", n, count, mcount));
      @(negedge clk);
    end
    check(mout, "random run reached a detection");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
