// Carry-save reduction of ROWS operand rows to two rows.
//
// The 1's counters leave one count per column; written in binary and placed
// by weight, the counts form a few rows of bits (one row per count bit).
// This block adds those rows with 3:2 carry-save rows until two remain,
// so only one carry-propagate addition is needed afterwards. Stage k adds
// the running sum and carry rows to operand row k+2, giving ROWS-2 stages
// (for 4 or 5 rows as deep as a Wallace tree). The result satisfies
// sum + carry == sum of all rows modulo 2^W. Combinational.
//
// The original design reduces the counts to two rows by carry-save
// adders; the order of the additions is this design's choice.
module csa_tree #(
  parameter int unsigned W    = 16,
  parameter int unsigned ROWS = 5
) (
  input  logic [ROWS-1:0][W-1:0] rows,
  output logic [W-1:0]           sum,
  output logic [W-1:0]           carry
);

  if (ROWS == 1) begin : g_one
    assign sum   = rows[0];
    assign carry = '0;
  end else if (ROWS == 2) begin : g_two
    assign sum   = rows[0];
    assign carry = rows[1];
  end else begin : g_chain
    logic [ROWS-2:0][W-1:0] s;
    logic [ROWS-2:0][W-1:0] c;
    assign s[0] = rows[0];
    assign c[0] = rows[1];
    for (genvar k = 0; k < ROWS - 2; k++) begin : g_stage
      csa_3to2 #(.W(W)) u_csa (
        .a    (s[k]),
        .b    (c[k]),
        .c    (rows[k+2]),
        .sum  (s[k+1]),
        .carry(c[k+1])
      );
    end
    assign sum   = s[ROWS-2];
    assign carry = c[ROWS-2];
  end

endmodule
