// fd2_fsm: secondary, robust switch fault detector (FD2).
//
// In continuous conduction the inductor current of a single-ended converter
// rises once and falls once in every switching period. FD2 follows that
// pattern with four states and declares a fault when a whole period passes
// (from one Trig pulse to the next) without it:
//   S0 switch off    : wait for Trig (q = 1)                      -> S1
//   S1 check fault   : Trig = 0 and slope +1                      -> S2
//                      Trig = 1 (current never rose: open switch) -> S3
//   S2 switch on     : slope -1                                   -> S0
//                      Trig = 1 (current never fell: shorted switch) -> S3
//   S3 fault         : stays until reset, fd2_out = 1
// Transitions and their labels follow the state diagram of the method.
// The text says S2 is left "when q = 0"; the diagram labels that arc with
// sgn(di/dt) = -1. The diagram is followed: leaving S2 on q alone would let a
// shorted switch through, which contradicts the text's own account of SCF.
//
// Interface: trig is the one-clock rising-edge pulse of q, sgn_pos the slope
// sign (1 = +1). Timing: one registered state, fd2_out is decoded from it; a
// fault is flagged on the clock after the Trig that ends the faulty period.
// Own choice: in S2, Trig takes priority over a simultaneous slope -1.
module fd2_fsm
  import fd_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       trig,
  input  logic       q,
  input  logic       sgn_pos,
  output fd2_state_e state,
  output logic       fd2_out
);

  fd2_state_e next;

  always_comb begin
    next = state;
    unique case (state)
      FD2_S0_OFF:   if (trig && q)    next = FD2_S1_CHECK;
      FD2_S1_CHECK: if (trig)         next = FD2_S3_FAULT;
                    else if (sgn_pos) next = FD2_S2_ON;
      FD2_S2_ON:    if (trig)         next = FD2_S3_FAULT;
                    else if (!sgn_pos) next = FD2_S0_OFF;
      FD2_S3_FAULT:                   next = FD2_S3_FAULT;
      default:                        next = FD2_S0_OFF;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state <= FD2_S0_OFF;
    else        state <= next;
  end

  assign fd2_out = (state == FD2_S3_FAULT);

endmodule
