// tb_slope_sign: checks the slope-sign estimator against a reference model of
// sgn(i_L[n] - i_L[n-5]) on a piecewise-linear current with random slopes,
// flat stretches and small noise. The model keeps its own history of the
// applied samples; a zero difference keeps the previous sign.
`timescale 1ns/1ps
module tb_slope_sign;
  localparam int unsigned LAG = 5;
  logic clk = 1'b0, rst_n = 1'b0;
  always #500 clk = ~clk;
  logic signed [15:0] i_l = '0;
  logic sgn_pos;
  int checks = 0, failures = 0;

  slope_sign #(.W(16), .LAG(LAG)) dut (.clk, .rst_n, .i_l, .sgn_pos);

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int hist[$];
    int fill, x, slope, seg, ups, downs;
    bit exp_pos;
    x = 1000; slope = 3; seg = 0; fill = 0; exp_pos = 0; ups = 0; downs = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int n = 0; n < 5000; n++) begin
      if (seg == 0) begin
        seg = 5 + $urandom_range(40);
        case ($urandom_range(4))
          0: slope = 0;
          1, 2: slope = 1 + $urandom_range(8);
          default: slope = -(1 + $urandom_range(20));
        endcase
      end
      seg--;
      x += slope + ((slope != 0) ? 0 : $urandom_range(2) - 1);
      i_l = 16'(x);
      @(posedge clk); #1;
      // reference
      if (fill < LAG) fill++;
      else if (x - hist[LAG-1] > 0) exp_pos = 1;
      else if (x - hist[LAG-1] < 0) exp_pos = 0;
      hist.push_front(x);
      if (hist.size() > LAG) void'(hist.pop_back());
      checks++;
      if (sgn_pos != exp_pos) begin
        failures++;
        if (failures < 10) $display("FAIL n=%0d sgn=%0d exp=%0d", n, sgn_pos, exp_pos);
      end
      if (exp_pos) ups++; else downs++;
      @(negedge clk);
    end
    checks++;
    if (ups == 0 || downs == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
