// Asynchronous 1's counter.
//
// Counts how many clock pulses arrive while `in` is 1. The counting clock is
// the AND of `clk` and `in`; it toggles the first flip-flop (D = Q-bar).
// Every further flip-flop is clocked by the Q-bar output of the one before
// it and also toggles, so a 1 -> 0 step of bit i-1 increments bit i: a
// ripple up-counter whose only per-pulse logic is one AND gate and one
// flip-flop. `rst_n` clears all stages asynchronously.
//
// Interface: q is the count modulo 2^W. Timing: q settles a ripple delay
// after each rising edge of (clk & in); `in` must be stable while clk is 1.
//
// The structure (AND-gated clock, toggle flip-flops chained through Q-bar,
// common active-low reset) follows the original 3-bit counter design; the width
// is a parameter so that each column gets the width it needs.
module ones_counter #(
  parameter int unsigned W = 3
) (
  input  logic         clk,
  input  logic         in,
  input  logic         rst_n,
  output logic [W-1:0] q
);

  // Clock of each stage: stage 0 sees the gated clock, stage i the Q-bar of
  // stage i-1.
  logic [W-1:0] stage_clk;

  assign stage_clk[0] = clk & in;

  for (genvar i = 0; i < W; i++) begin : g_stage
    if (i > 0) begin : g_link
      assign stage_clk[i] = ~q[i-1];
    end
    logic bit_q;
    always_ff @(posedge stage_clk[i] or negedge rst_n) begin
      if (!rst_n) bit_q <= 1'b0;
      else        bit_q <= ~bit_q;
    end
    assign q[i] = bit_q;
  end

endmodule
