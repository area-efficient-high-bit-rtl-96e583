// One row of carry-save adders (3:2 compressor).
//
// W full adders side by side add three W-bit rows into a sum row and a
// carry row without propagating any carry: sum = a ^ b ^ c, and the
// majority of each column goes one column up in `carry` (carry[0] = 0).
// a + b + c == sum + carry modulo 2^W. Combinational.
module csa_3to2 #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  output logic [W-1:0] sum,
  output logic [W-1:0] carry
);

  logic [W-1:0] maj;

  assign sum   = a ^ b ^ c;
  assign maj   = (a & b) | (a & c) | (b & c);
  assign carry = {maj[W-2:0], 1'b0};

endmodule
