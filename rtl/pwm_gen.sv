// pwm_gen: pulse-width modulator producing the switching command q.
//
// A sawtooth carrier counts 0 .. PERIOD-1 clocks; q = 1 while the carrier is
// below the duty cycle, so each switching period starts with the on-interval
// D T_s (switch closed, inductor current rising) followed by (1-D) T_s off.
// PERIOD = 67 clocks of 1 us gives 14.93 kHz, the closest a 1 MHz clock comes
// to the 15 kHz switching frequency of the reference converter.
//
// Interface: duty is unsigned with D_W fraction bits (0 .. 1-2^-D_W).
// Timing: duty is sampled once per period, on the clock where the carrier
// wraps, and converted to a count round(duty * PERIOD); q is a decode of
// registers and changes on the clock edge. period_start is high in the first
// clock of every period.
// Own choices: the carrier resolution (one clock), the once-per-period update.
module pwm_gen #(
  parameter int unsigned PERIOD = 67,
  parameter int unsigned D_W    = fd_pkg::D_W
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic [D_W-1:0] duty,
  output logic           q,
  output logic           period_start,
  output logic [$clog2(PERIOD+1)-1:0] carrier
);

  localparam int unsigned CW = $clog2(PERIOD+1);

  logic [CW-1:0]     cmp;
  logic [D_W+CW-1:0] prod;
  logic [CW-1:0]     cmp_next;

  assign prod     = (D_W+CW)'(duty) * (D_W+CW)'(PERIOD) + (D_W+CW)'(1 << (D_W-1));
  assign cmp_next = prod[D_W+CW-1:D_W];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      carrier <= '0;
      cmp     <= '0;
    end else if (carrier == CW'(PERIOD-1)) begin
      carrier <= '0;
      cmp     <= cmp_next;
    end else begin
      carrier <= carrier + 1'b1;
    end
  end

  assign q            = (carrier < cmp);
  assign period_start = (carrier == '0);

endmodule
