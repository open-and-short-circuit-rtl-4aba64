// boost_ctrl: cascade control of the boost converter.
//
// Outer loop: the output-capacitor energy e_o = 0.5 C v_o^2 is regulated to
// e_oref = 0.5 C v_oref^2 by a PI controller whose limited output is the
// inductor current reference i_Lref. Inner loop: a second PI controller drives
// i_L to i_Lref; its limited output is the duty cycle D, and a PWM turns D into
// the switching command q. Gains default to the reference converter's
// (K_peo 22.5, K_ieo 112.5, K_piL 0.0895, K_iiL 0.8953).
//
// Interface: v_o, v_oref unsigned volts (V_FRAC fraction bits), i_l signed
// amperes (I_FRAC fraction bits), one sample per clock of period TS.
// Timing: energy 1 clock, each PI 1 clock, so D reacts to v_o after 3 clocks
// and to i_l after 1; the PWM takes up D at its next period.
// Own choices: the limiter values and the discretisation inside pi_ctrl.
// i_Lref is limited to 0..I_LREF_MAX = 40 A. D is limited to
// [D_MIN, D_MAX] = [0.15, 0.85], so that both the on-time and the off-time,
// 0.15 T_s = 10 us, are at least the total sensing and switching delay T_d of
// about 10 us. The diagnosis needs this: FD2 must see the current rise and
// fall within every period, and a duty cycle pinned near 0 or 1 by a
// transient would otherwise raise a false alarm.
module boost_ctrl
  import fd_pkg::*;
#(
  parameter real         C_F        = 2200.0e-6,
  parameter real         KP_EO      = 22.5,
  parameter real         KI_EO      = 112.5,
  parameter real         KP_IL      = 0.0895,
  parameter real         KI_IL      = 0.8953,
  parameter real         TS         = 1.0e-6,
  parameter real         I_LREF_MAX = 40.0,
  parameter real         D_MIN      = 0.15,
  parameter real         D_MAX      = 0.85,
  parameter int unsigned PWM_PERIOD = 67
) (
  input  logic     clk,
  input  logic     rst_n,
  input  voltage_t v_oref,
  input  voltage_t v_o,
  input  current_t i_l,
  output logic     q,
  output duty_t    duty,
  output current_t i_lref,
  output energy_t  e_o,
  output energy_t  e_oref,
  output logic     period_start
);

  logic signed [D_W+1:0] d_s;   // signed PI output, limited to [D_MIN, D_MAX]
  logic [$clog2(PWM_PERIOD+1)-1:0] carrier;

  energy_calc #(.V_W(V_W), .V_FRAC(V_FRAC), .E_W(E_W), .E_FRAC(E_FRAC), .C_F(C_F))
    u_e_ref (.clk, .rst_n, .v(v_oref), .e(e_oref));
  energy_calc #(.V_W(V_W), .V_FRAC(V_FRAC), .E_W(E_W), .E_FRAC(E_FRAC), .C_F(C_F))
    u_e_o   (.clk, .rst_n, .v(v_o),    .e(e_o));

  pi_ctrl #(
    .IN_W(E_W), .IN_FRAC(E_FRAC), .OUT_W(I_W), .OUT_FRAC(I_FRAC),
    .KP(KP_EO), .KI(KI_EO), .TS(TS), .OUT_MIN(0.0), .OUT_MAX(I_LREF_MAX)
  ) u_pi_e (.clk, .rst_n, .ref_in(e_oref), .meas(e_o), .out(i_lref));

  pi_ctrl #(
    .IN_W(I_W), .IN_FRAC(I_FRAC), .OUT_W(D_W+2), .OUT_FRAC(D_FRAC),
    .KP(KP_IL), .KI(KI_IL), .TS(TS), .OUT_MIN(D_MIN), .OUT_MAX(D_MAX)
  ) u_pi_i (.clk, .rst_n, .ref_in(i_lref), .meas(i_l), .out(d_s));

  assign duty = d_s[D_W-1:0];

  pwm_gen #(.PERIOD(PWM_PERIOD), .D_W(D_W)) u_pwm (
    .clk, .rst_n, .duty, .q, .period_start, .carrier
  );

endmodule
