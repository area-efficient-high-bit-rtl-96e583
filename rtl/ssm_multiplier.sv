// Serial-serial multiplier with asynchronous 1's counters (top level).
//
// Two operands arrive one bit per clock: X most significant bit first, Y
// least significant bit first. Because the two streams run in opposite
// bit orders, the partial-product bits can be grouped so that one row of
// up to 2N-1 bits is formed per cycle and every bit has a fixed column:
// all N*N partial products exist after N cycles instead of 2N. Each
// column's one-bits are counted by an asynchronous 1's counter; after the
// N-th cycle the counts are latched, reduced to two rows by carry-save
// adders and summed by a carry-propagate adder (carry-lookahead by
// default, ripple-carry with USE_CLA = 0). With signed_mode = 1 the
// operands are two's complement and the Baugh-Wooley form is used.
//
// Protocol: while `ready`, raise `start` for one clock with x_in = x[N-1]
// and y_in = y[0]; on the next N-1 clocks present x[N-2..0] and y[1..N-1].
// signed_mode is sampled with start. `done` pulses N clocks after the start
// edge, and `product` (2N bits, two's complement in signed mode) then holds
// the result until the next result replaces it. `ready` returns one clock
// after the last bit, so operations can be issued every N+1 clocks.
//
// Block structure, bit orders, counter widths, latching register and adder
// stages follow the original design; the start/ready/done handshake, the single
// clock and the clearing cycle are this design's choices.
module ssm_multiplier
  import ssm_pkg::*;
#(
  parameter int unsigned N       = N_DEFAULT,
  parameter bit          USE_CLA = 1'b1
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic           signed_mode,
  input  logic           x_in,
  input  logic           y_in,
  output logic           ready,
  output logic           done,
  output logic [2*N-1:0] product
);

  logic                 load;
  logic                 shift;
  logic                 run;
  logic [$clog2(N)-1:0] cycle;
  logic                 mode;
  logic                 cnt_clr_n;
  logic                 latch_en;
  logic [N-1:0]         x_taps;
  logic [N-1:0]         y_taps;
  logic [2*N-2:0]       pp;

  ssm_controller #(.N(N)) u_ctrl (
    .clk        (clk),
    .rst_n      (rst_n),
    .start      (start),
    .signed_mode(signed_mode),
    .ready      (ready),
    .load       (load),
    .shift      (shift),
    .run        (run),
    .cycle      (cycle),
    .mode       (mode),
    .cnt_clr_n  (cnt_clr_n),
    .latch_en   (latch_en),
    .done       (done)
  );

  // Left shift register: X, most significant bit first.
  operand_shift_reg #(.N(N)) u_xreg (
    .clk  (clk),
    .rst_n(rst_n),
    .load (load),
    .shift(shift),
    .d_in (x_in),
    .taps (x_taps)
  );

  // Right shift register: Y, least significant bit first.
  operand_shift_reg #(.N(N)) u_yreg (
    .clk  (clk),
    .rst_n(rst_n),
    .load (load),
    .shift(shift),
    .d_in (y_in),
    .taps (y_taps)
  );

  pp_generator #(.N(N)) u_ppgen (
    .x_taps     (x_taps),
    .y_taps     (y_taps),
    .cycle      (cycle),
    .run        (run),
    .signed_mode(mode),
    .pp         (pp)
  );

  serial_accumulator #(.N(N), .USE_CLA(USE_CLA)) u_acc (
    .clk      (clk),
    .rst_n    (rst_n),
    .pp       (pp),
    .cnt_clr_n(cnt_clr_n),
    .latch_en (latch_en),
    .mode     (mode),
    .product  (product)
  );

endmodule
