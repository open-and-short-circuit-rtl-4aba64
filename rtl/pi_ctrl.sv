// pi_ctrl: discrete proportional-integral controller with output limiter.
//
// out = sat( KP * err + KI * sum(err * TS) ),  err = ref - meas,
// integrated with the forward Euler rule once per clock (TS = clock period).
// Both loops of the converter control use it: the energy loop (output i_Lref)
// and the current loop (output D). Gains are given as real numbers in the
// physical units of input and output and turned into integers with GF = 24
// fraction bits at elaboration.
//
// Interface: ref and meas share one signed format (IN_FRAC fraction bits),
// out is signed with OUT_FRAC fraction bits and limited to [OUT_MIN, OUT_MAX].
// Timing: one register, out follows ref/meas one clock later.
// Own choices: forward-Euler discretisation, the limits and anti-windup by
// conditional integration (the integrator stops while the output is at a
// limit and the error would push it further).
module pi_ctrl #(
  parameter int unsigned IN_W     = 24,
  parameter int unsigned IN_FRAC  = 12,
  parameter int unsigned OUT_W    = 16,
  parameter int unsigned OUT_FRAC = 8,
  parameter real         KP       = 22.5,
  parameter real         KI       = 112.5,
  parameter real         TS       = 1.0e-6,
  parameter real         OUT_MIN  = 0.0,
  parameter real         OUT_MAX  = 40.0
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic signed [IN_W-1:0]  ref_in,
  input  logic signed [IN_W-1:0]  meas,
  output logic signed [OUT_W-1:0] out
);

  localparam int unsigned GF    = 24;
  localparam int unsigned SHIFT = IN_FRAC + GF - OUT_FRAC;
  localparam longint KP_Q  = longint'(KP * (2.0 ** GF));
  localparam longint KIT_Q = longint'(KI * TS * (2.0 ** GF));
  localparam longint MIN_Q = longint'(OUT_MIN * (2.0 ** OUT_FRAC));
  localparam longint MAX_Q = longint'(OUT_MAX * (2.0 ** OUT_FRAC));
  // limits expressed in the accumulator's format
  localparam longint ACC_MIN = MIN_Q * (64'sd1 <<< SHIFT);
  localparam longint ACC_MAX = MAX_Q * (64'sd1 <<< SHIFT);

  logic signed [IN_W:0] err;
  logic signed [63:0]   p_term, i_step, acc, acc_next, sum, out_full;
  logic                 sat_hi, sat_lo;

  assign err      = (IN_W+1)'(ref_in) - (IN_W+1)'(meas);
  assign p_term   = 64'(err) * KP_Q;
  assign i_step   = 64'(err) * KIT_Q;
  assign sum      = p_term + acc;
  assign out_full = sum >>> SHIFT;
  assign sat_hi   = out_full > MAX_Q;
  assign sat_lo   = out_full < MIN_Q;

  always_comb begin
    acc_next = acc;
    if (!(sat_hi && err > 0) && !(sat_lo && err < 0)) acc_next = acc + i_step;
    if (acc_next > ACC_MAX) acc_next = ACC_MAX;
    if (acc_next < ACC_MIN) acc_next = ACC_MIN;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc <= '0;
      out <= OUT_W'(MIN_Q);
    end else begin
      acc <= acc_next;
      if (sat_hi)      out <= OUT_W'(MAX_Q);
      else if (sat_lo) out <= OUT_W'(MIN_Q);
      else             out <= out_full[OUT_W-1:0];
    end
  end

endmodule
