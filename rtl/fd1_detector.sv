// fd1_detector: primary, fast switch fault detector (FD1).
//
// The expected slope sign follows the switching command: S_q' = sign(q - 0.5)
// is +1 while the switch is commanded on and -1 while it is commanded off.
// error = 1 whenever the measured slope sign sgn(di_L/dt) differs from S_q'.
// Because converter, driver and sensor delays make error pulse briefly at
// every switching edge even without a fault, a time criterion is applied: a
// counter runs while error = 1 and is cleared as soon as error = 0, and a fault
// is declared when the count exceeds N (N sampling periods, N T_c > T_d).
// With N = 20 and T_c = 1 us the observation time is 20 us, twice the 10 us
// total delay of the converter the method was demonstrated on.
//
// Interface: q and sgn_pos are sampled on every clock (one clock = T_c).
// fd1_detect is the comparator output count > N; fd1_out is the same
// condition latched until reset.
// Timing: with error held high from a clock edge on, count reaches N+1 and
// fd1_detect rises N+1 clocks later.
// Own choices: the counter saturates at N+1; the latch on fd1_out, so that a
// detection survives the clearing of the counter when error falls again.
module fd1_detector #(
  parameter int unsigned N = 20
) (
  input  logic clk,
  input  logic rst_n,
  input  logic q,          // switching command
  input  logic sgn_pos,    // measured slope sign, 1 = +1, 0 = -1
  output logic error,
  output logic [$clog2(N+2)-1:0] count,
  output logic fd1_detect,
  output logic fd1_out
);

  localparam int unsigned CW = $clog2(N+2);
  localparam logic [CW-1:0] CMAX = CW'(N + 1);

  logic sq_pos;            // S_q' = sign(q - 0.5): 1 means +1

  assign sq_pos     = q;
  assign error      = (sgn_pos != sq_pos);
  assign fd1_detect = (count > CW'(N));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count   <= '0;
      fd1_out <= 1'b0;
    end else begin
      if (!error)              count <= '0;
      else if (count != CMAX)  count <= count + 1'b1;
      if (fd1_detect)          fd1_out <= 1'b1;
    end
  end

endmodule
