// energy_calc: energy stored in the output capacitor, e = 0.5 C v^2.
//
// The converter's outer loop regulates this energy instead of the output
// voltage, which makes the loop linear in the controlled variable; the same
// block converts both the voltage reference and the measured voltage.
// C defaults to the 2200 uF output capacitor of the reference converter.
//
// Interface: v is an unsigned fixed-point voltage (V_FRAC fraction bits), e a
// signed fixed-point energy (E_FRAC fraction bits). Timing: one register,
// e is valid one clock after v.
// Own choices: 0.5 C is held as an integer with CQ_FRAC = 32 fraction bits and
// the product is truncated to the energy format.
module energy_calc #(
  parameter int unsigned V_W    = fd_pkg::V_W,
  parameter int unsigned V_FRAC = fd_pkg::V_FRAC,
  parameter int unsigned E_W    = fd_pkg::E_W,
  parameter int unsigned E_FRAC = fd_pkg::E_FRAC,
  parameter real         C_F    = 2200.0e-6
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic        [V_W-1:0] v,
  output logic signed [E_W-1:0] e
);

  localparam int unsigned CQ_FRAC = 32;
  localparam longint unsigned HALF_C_Q = longint'(0.5 * C_F * (2.0 ** CQ_FRAC));
  localparam int unsigned SHIFT = 2*V_FRAC + CQ_FRAC - E_FRAC;

  logic [2*V_W-1:0] v_sq;
  logic [2*V_W+63:0] prod;
  logic [2*V_W+63:0] e_full;

  assign v_sq   = v * v;
  assign prod   = (2*V_W+64)'(v_sq) * (2*V_W+64)'(HALF_C_Q);
  assign e_full = prod >> SHIFT;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) e <= '0;
    else        e <= $signed(e_full[E_W-1:0]);
  end

endmodule
