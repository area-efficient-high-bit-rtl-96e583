// Counter-based serial accumulator with carry-save and carry-propagate
// adders.
//
// Instead of adding each partial-product row into a register with full
// adders, one asynchronous 1's counter per column counts the one-bits that
// column receives over the N bit cycles. The counter of column c ends with
// the number of ones of weight 2^c, so the product is
//   sum over c of count[c] * 2^c.
// After the last bit cycle the latching register captures every count.
// Bit b of column c's count is placed at weight 2^(c+b), which turns the
// 2N-1 counts into max_count_width(N) rows of bits (for N = 8 four rows
// holding 15, 13, 9 and 1 bits). In signed mode a fifth row holds the
// Baugh-Wooley constant 2^N - 2^(2N-1), written modulo 2^(2N) as
// 2^N + 2^(2N-1). A carry-save stage reduces the rows to two and a
// carry-propagate adder (CLA when USE_CLA = 1, else ripple-carry) adds
// them.
//
// Timing: the counters count on the falling clock edge (the counting clock
// is the inverted clock ANDed with each pp bit), so the pp inputs, which
// come from flip-flops updated on the rising edge, are stable at every
// counting pulse and the critical path per bit is one AND gate and one
// flip-flop. cnt_clr_n low clears the counters asynchronously. latch_en
// high at a rising edge captures the counts; `product` is combinational
// from the latching register and is valid from the cycle after that edge
// until the next latch.
//
// Column counters, latching register, carry-save reduction and final adder
// follow the original design. The falling-edge count phase, the bit placement of
// the counts and the constant row are this design's choices.
module serial_accumulator
  import ssm_pkg::*;
#(
  parameter int unsigned N       = 8,
  parameter bit          USE_CLA = 1'b1
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic [2*N-2:0] pp,
  input  logic           cnt_clr_n,
  input  logic           latch_en,
  input  logic           mode,
  output logic [2*N-1:0] product
);

  localparam int unsigned PW   = 2 * N;                // product width
  localparam int unsigned CB   = total_count_bits(N);  // all counter bits
  localparam int unsigned CW   = max_count_width(N);   // bit-plane rows
  localparam int unsigned ROWS = CW + 1;               // + constant row

  logic          count_clk;
  logic          count_rst_n;
  logic [CB-1:0] counts;
  logic [CB:0]   latched;      // {mode, counts}
  logic [CB-1:0] held;
  logic          held_mode;

  assign count_clk   = ~clk;
  assign count_rst_n = rst_n & cnt_clr_n;

  for (genvar c = 0; c < 2 * N - 1; c++) begin : g_col
    localparam int unsigned CWC = col_width(N, c);
    localparam int unsigned OFS = col_offset(N, c);
    ones_counter #(.W(CWC)) u_cnt (
      .clk  (count_clk),
      .in   (pp[c]),
      .rst_n(count_rst_n),
      .q    (counts[OFS +: CWC])
    );
  end

  latching_register #(.W(CB + 1)) u_latch (
    .clk  (clk),
    .rst_n(rst_n),
    .en   (latch_en),
    .d    ({mode, counts}),
    .q    (latched)
  );

  assign held      = latched[CB-1:0];
  assign held_mode = latched[CB];

  // Each column's latched count, zero-extended to the widest count.
  logic [2*N-2:0][CW-1:0] col_count;

  for (genvar c = 0; c < 2 * N - 1; c++) begin : g_unpack
    localparam int unsigned CWC = col_width(N, c);
    localparam int unsigned OFS = col_offset(N, c);
    assign col_count[c] = CW'(held[OFS +: CWC]);
  end

  // Reduced partial products: row b collects bit b of every count, placed
  // at weight 2^(c+b); the last row is the signed-mode constant.
  logic [ROWS-1:0][PW-1:0] rows;

  always_comb begin
    rows = '0;
    for (int unsigned c = 0; c < 2 * N - 1; c++) begin
      for (int unsigned b = 0; b < CW; b++) begin
        rows[b][c+b] = col_count[c][b];
      end
    end
    if (held_mode) begin
      rows[ROWS-1][N]    = 1'b1;
      rows[ROWS-1][PW-1] = 1'b1;
    end
  end

  logic [PW-1:0] cs_sum;
  logic [PW-1:0] cs_carry;

  csa_tree #(.W(PW), .ROWS(ROWS)) u_csa (
    .rows (rows),
    .sum  (cs_sum),
    .carry(cs_carry)
  );

  logic cpa_cout;

  if (USE_CLA) begin : g_cla
    cla_adder #(.W(PW)) u_cpa (
      .a   (cs_sum),
      .b   (cs_carry),
      .cin (1'b0),
      .sum (product),
      .cout(cpa_cout)
    );
  end else begin : g_rca
    rca_adder #(.W(PW)) u_cpa (
      .a   (cs_sum),
      .b   (cs_carry),
      .cin (1'b0),
      .sum (product),
      .cout(cpa_cout)
    );
  end

endmodule
