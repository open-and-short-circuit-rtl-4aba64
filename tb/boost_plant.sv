// boost_plant: behavioural model (not synthesizable) of the boost converter
// power stage with its sensors, used only by testbenches.
//
// State variables are the inductor current il and output voltage vo, in real
// arithmetic, integrated with forward Euler in SUBSTEPS steps per clock
// (clock = 1 us sampling period). Circuit: input vin -> L with series r_L ->
// switch S to ground, diode to C_o parallel R. With S closed the inductor
// charges from vin; with S open it feeds the output through the diode, and
// the diode stops a negative inductor current (discontinuous conduction).
// vin is the six-pulse output of a three-phase diode bridge without a
// smoothing capacitor (300 Hz ripple, mean VIN_AVG), as in the converter the
// diagnosis method was demonstrated on; RIPPLE = 0 gives a constant vin.
// fault_mode: 0 healthy, 1 open-circuit switch (S stays open whatever the
// command), 2 short-circuit switch (S stays closed).
// Outputs are quantised to the fd_pkg fixed-point formats and delayed by
// SENSE_DELAY clocks, standing for sensor, amplifier and A/D delays.
// The load can be changed with set_state. Defaults: L 3 mH, r_L 0.1 ohm, C 2200 uF, R 50 ohm, vin 50 V.
`timescale 1ns/1ps
module boost_plant
  import fd_pkg::*;
#(
  parameter real         VIN_AVG     = 50.0,
  parameter real         RIPPLE      = 1.0,
  parameter real         L_H         = 3.0e-3,
  parameter real         RL_OHM      = 0.1,
  parameter real         C_F         = 2200.0e-6,
  parameter real         R_OHM       = 50.0,
  parameter real         DT          = 1.0e-6,
  parameter int unsigned SUBSTEPS    = 10,
  parameter int unsigned SENSE_DELAY = 3
) (
  input  logic     clk,
  input  logic     gate,
  input  logic [1:0] fault_mode,
  output current_t i_l,
  output voltage_t v_o,
  output logic     switch_on
);

  real il, vo, t, r_load;
  current_t il_q [SENSE_DELAY+1];
  voltage_t vo_q [SENSE_DELAY+1];

  // 6-pulse rectified voltage: peak * cos(x), x in [-30, 30] deg, mean VIN_AVG
  localparam real PI_R = 3.14159265358979;
  localparam real VPK  = VIN_AVG * (PI_R / 3.0);

  function automatic real vin_at(real tt);
    real ph;
    if (RIPPLE == 0.0) return VIN_AVG;
    ph = tt * 300.0;
    ph = ph - $floor(ph);
    return VPK * $cos((ph - 0.5) * PI_R / 3.0);
  endfunction

  function automatic current_t q_i(real x);
    real y;
    y = x * 256.0;
    if (y > 32767.0)  y = 32767.0;
    if (y < -32768.0) y = -32768.0;
    return current_t'($rtoi(y >= 0.0 ? y + 0.5 : y - 0.5));
  endfunction

  function automatic voltage_t q_v(real x);
    real y;
    y = x * 64.0;
    if (y > 65535.0) y = 65535.0;
    if (y < 0.0)     y = 0.0;
    return voltage_t'($rtoi(y + 0.5));
  endfunction

  // Put the converter in the steady state of a healthy converter at vout
  // with load resistance rload.
  task automatic set_state(real vout, real rload);
    r_load = rload;
    vo = vout;
    il = vout * vout / r_load / VIN_AVG;
    for (int k = 0; k <= SENSE_DELAY; k++) begin
      il_q[k] = q_i(il);
      vo_q[k] = q_v(vo);
    end
  endtask

  initial begin
    t = 0.0;
    set_state(100.0, R_OHM);
  end

  assign switch_on = (fault_mode == 2'd1) ? 1'b0 :
                     (fault_mode == 2'd2) ? 1'b1 : gate;

  always @(posedge clk) begin
    real h, vin, dil, dvo;
    h = DT / SUBSTEPS;
    for (int s = 0; s < SUBSTEPS; s++) begin
      vin = vin_at(t);
      if (switch_on) begin
        dil = (vin - RL_OHM * il) / L_H;
        dvo = -vo / (r_load * C_F);
      end else begin
        dil = (vin - RL_OHM * il - vo) / L_H;
        dvo = (il - vo / r_load) / C_F;
      end
      il = il + h * dil;
      vo = vo + h * dvo;
      if (!switch_on && il < 0.0) il = 0.0;
      if (il > 120.0) il = 120.0;
      if (vo < 0.0) vo = 0.0;
      t = t + h;
    end
    il_q[0] <= q_i(il);
    vo_q[0] <= q_v(vo);
    for (int k = 1; k <= SENSE_DELAY; k++) begin
      il_q[k] <= il_q[k-1];
      vo_q[k] <= vo_q[k-1];
    end
  end

  assign i_l = il_q[SENSE_DELAY];
  assign v_o = vo_q[SENSE_DELAY];

endmodule
