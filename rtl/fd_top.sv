// fd_top: converter control and switch fault diagnosis on one device.
//
// The cascade controller (boost_ctrl) produces the switching command q from
// the sampled output voltage and inductor current; the fault diagnosis
// (fault_diag) watches the same inductor-current samples against the same q
// and raises fault when the switch is open or shorted. Sharing the current
// measurement between control and diagnosis is the point of the method: no
// sensor is added for fault detection.
//
// Interface: i_l and v_o are the converted sensor samples, one per clock
// (clock = 1 MHz sampling rate T_c = 1 us); q goes to the switch driver.
// fault, fd1_out and fd2_out are sticky until rst_n. The converter, sensors and
// A/D converters are outside; the scaling from converter codes to the
// fixed-point formats of fd_pkg is left to the board interface. What to do
// once a fault is flagged (shut-down or reconfiguration) is not part of it.
module fd_top
  import fd_pkg::*;
#(
  parameter int unsigned N          = 20,
  parameter int unsigned LAG        = 5,
  parameter int unsigned PWM_PERIOD = 67
) (
  input  logic       clk,
  input  logic       rst_n,
  input  voltage_t   v_oref,
  input  voltage_t   v_o,
  input  current_t   i_l,
  output logic       q,
  output duty_t      duty,
  output current_t   i_lref,
  output logic       fault,
  output logic       fd1_out,
  output logic       fd2_out,
  output logic       sgn_pos,
  output logic       fd1_error,
  output logic [$clog2(N+2)-1:0] fd1_count,
  output logic       trig,
  output fd2_state_e fd2_state
);

  energy_t e_o, e_oref;
  logic    period_start;
  logic    fd1_detect;

  boost_ctrl #(.PWM_PERIOD(PWM_PERIOD)) u_ctrl (
    .clk, .rst_n, .v_oref, .v_o, .i_l, .q, .duty, .i_lref, .e_o, .e_oref,
    .period_start
  );

  fault_diag #(.N(N), .LAG(LAG)) u_fd (
    .clk, .rst_n, .i_l, .q, .fault, .fd1_out, .fd2_out, .sgn_pos,
    .error(fd1_error), .fd1_count, .fd1_detect, .trig, .fd2_state
  );

endmodule
