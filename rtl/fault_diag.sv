// fault_diag: hybrid open- and short-circuit switch fault diagnosis for a
// single-ended non-isolated DC-DC converter.
//
// Only the inductor current i_L (already measured for control) and the
// switching command q are used. The slope sign of i_L feeds two detectors that
// run in parallel: FD1 (fd1_detector), fast, which compares the slope sign
// with the command and applies a time criterion of N samples; and FD2
// (fd2_fsm), slower but valid for any duty cycle and switching frequency,
// which checks that the current rises and falls once between two rising edges
// of q (Trig, from edge_detect). Fault = FD1_out OR FD2_out.
//
// Interface: one i_L sample per clock (clock period = sampling period T_c,
// 1 us in the reference implementation). All flags stay set until reset.
// Timing: FD1 flags N+1 samples after its error condition starts (plus the
// slope estimator's delay); FD2 flags at most two switching periods after a
// fault. The structure follows the method; the latching of FD1_out is this
// design's choice.
module fault_diag
  import fd_pkg::*;
#(
  parameter int unsigned N   = 20,
  parameter int unsigned LAG = 5
) (
  input  logic       clk,
  input  logic       rst_n,
  input  current_t   i_l,
  input  logic       q,
  output logic       fault,
  output logic       fd1_out,
  output logic       fd2_out,
  // observation signals
  output logic       sgn_pos,
  output logic       error,
  output logic [$clog2(N+2)-1:0] fd1_count,
  output logic       fd1_detect,
  output logic       trig,
  output fd2_state_e fd2_state
);

  slope_sign #(.W(I_W), .LAG(LAG)) u_slope (
    .clk, .rst_n, .i_l, .sgn_pos
  );

  edge_detect u_edge (
    .clk, .rst_n, .q, .trig
  );

  fd1_detector #(.N(N)) u_fd1 (
    .clk, .rst_n, .q, .sgn_pos, .error, .count(fd1_count),
    .fd1_detect, .fd1_out
  );

  fd2_fsm u_fd2 (
    .clk, .rst_n, .trig, .q, .sgn_pos, .state(fd2_state), .fd2_out
  );

  assign fault = fd1_out | fd2_out;

endmodule
