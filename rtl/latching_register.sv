// Latching register between the 1's counters and the adder stages.
//
// Captures the counter values (and the mode of the operation) on the clock
// edge where `en` is high, i.e. the edge after the last counting pulse, and
// holds them while the counters are cleared and count the next operation.
// The adder stages behind it therefore see stable operands for a whole
// operation. The register and its clock (clk2) come from the original
// design; its asynchronous clear is this design's choice.
module latching_register #(
  parameter int unsigned W = 26
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  q <= '0;
    else if (en) q <= d;
  end

endmodule
