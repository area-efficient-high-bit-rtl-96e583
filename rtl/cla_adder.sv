// Carry-lookahead adder used as the final carry-propagate adder.
//
// Each bit position generates a carry when both inputs are 1 (g = a & b),
// kills it when both are 0, and propagates the incoming carry when they
// differ (p = a ^ b). The carries into all positions are computed at once
// by a tree of (g, p) combining operators, log2(W) levels deep
// (Kogge-Stone arrangement): level l merges each position with the one
// 2^l below it. The input carry is folded into bit 0's generate signal.
// Combinational.
//
// The generate/propagate rule and the use of a carry tree come from the
// original design; the Kogge-Stone arrangement is this design's choice.
module cla_adder #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);

  localparam int unsigned L = (W > 1) ? $clog2(W) : 1;

  logic [W-1:0] p0;
  logic [L:0][W-1:0] g;   // g[l][i]: carry out of bits i..i-2^l+1 (with cin)
  logic [L:0][W-1:0] p;   // p[l][i]: the same group propagates

  assign p0   = a ^ b;
  assign p[0] = p0;
  assign g[0] = (a & b) | {{(W-1){1'b0}}, p0[0] & cin};

  for (genvar l = 0; l < L; l++) begin : g_level
    for (genvar i = 0; i < W; i++) begin : g_bit
      if (i >= (1 << l)) begin : g_merge
        assign g[l+1][i] = g[l][i] | (p[l][i] & g[l][i - (1 << l)]);
        assign p[l+1][i] = p[l][i] & p[l][i - (1 << l)];
      end else begin : g_pass
        assign g[l+1][i] = g[l][i];
        assign p[l+1][i] = p[l][i];
      end
    end
  end

  // Carry into bit i is the group generate of bits i-1..0.
  assign sum  = p0 ^ {g[L][W-2:0], cin};
  assign cout = g[L][W-1];

endmodule
