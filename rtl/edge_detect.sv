// edge_detect: rising-edge detector that turns the switching command q into
// the "Trig" pulse used by the FD2 state machine.
//
// q is registered once; trig = q & ~q_prev is high for exactly one clock, in
// the clock in which q is first seen high, i.e. at the start of every
// switching period (q rises when the PWM carrier restarts).
// The document names the block and its purpose; the one-flip-flop circuit is
// the simplest that does it and is this design's choice.
module edge_detect (
  input  logic clk,
  input  logic rst_n,
  input  logic q,
  output logic trig
);

  logic q_prev;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q_prev <= 1'b0;
    else        q_prev <= q;
  end

  assign trig = q & ~q_prev;

endmodule
