// slope_sign: sign of the inductor-current slope, sgn(di_L/dt).
//
// The derivative is estimated as a difference over LAG samples,
// sgn(i_L[n] - i_L[n-LAG]), i.e. sgn(i_L (1 - z^-LAG)) with LAG = 5 as in the
// diagnosis method's experimental implementation. A difference over several
// samples rather than one keeps quantisation noise and sensor ripple from
// flipping the sign on every sample.
//
// Interface: one new i_L sample per clock (the clock period is the sampling
// period T_c). sgn_pos = 1 means the current rises (+1), 0 means it falls (-1).
// Timing: sgn_pos is registered; it reflects the sample taken on the same
// edge, compared with the sample LAG clocks older.
// Own choices: a zero difference keeps the previous sign (the document gives
// only the two values +1 and -1); after reset the output holds at "falling"
// until LAG samples have been collected.
module slope_sign #(
  parameter int unsigned W   = fd_pkg::I_W,
  parameter int unsigned LAG = 5
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic signed [W-1:0] i_l,
  output logic                sgn_pos
);

  logic signed [W-1:0] hist [LAG];
  logic [$clog2(LAG+1)-1:0] fill;
  logic signed [W:0] diff;

  assign diff = (W+1)'(i_l) - (W+1)'(hist[LAG-1]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < LAG; k++) hist[k] <= '0;
      fill    <= '0;
      sgn_pos <= 1'b0;
    end else begin
      hist[0] <= i_l;
      for (int k = 1; k < LAG; k++) hist[k] <= hist[k-1];
      if (fill != LAG[$clog2(LAG+1)-1:0]) begin
        fill <= fill + 1'b1;
      end else if (diff > 0) begin
        sgn_pos <= 1'b1;
      end else if (diff < 0) begin
        sgn_pos <= 1'b0;
      end
    end
  end

endmodule
