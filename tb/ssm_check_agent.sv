// Self-checking driver for one multiplier instance (testbench helper).
//
// Instantiates ssm_multiplier with the given N and final-adder choice,
// feeds it operand pairs serially (X MSB first, Y LSB first) in both
// unsigned and signed mode and compares each product with the product
// computed here. With EXHAUSTIVE = 1 every operand pair is tried, else
// NUM_RANDOM random pairs per mode plus the extreme values. Reports its
// totals through the output ports when `finished` rises.
module ssm_check_agent #(
  parameter int unsigned N          = 8,
  parameter bit          USE_CLA    = 1'b1,
  parameter bit          EXHAUSTIVE = 1'b0,
  parameter int unsigned NUM_RANDOM = 1000
) (
  input  logic clk,
  input  logic rst_n,
  output logic finished,
  output int   checks,
  output int   failures
);

  logic           start;
  logic           signed_mode;
  logic           x_in;
  logic           y_in;
  logic           ready;
  logic           done;
  logic [2*N-1:0] product;

  ssm_multiplier #(.N(N), .USE_CLA(USE_CLA)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .signed_mode(signed_mode),
    .x_in(x_in), .y_in(y_in), .ready(ready), .done(done), .product(product)
  );

  task automatic run_op(input logic [N-1:0] x, input logic [N-1:0] y, input logic sm);
    logic [2*N-1:0] expected;
    int             clocks;
    while (!ready) @(negedge clk);
    start = 1'b1; signed_mode = sm; x_in = x[N-1]; y_in = y[0];
    for (int r = 1; r < N; r++) begin
      @(negedge clk);
      start = 1'b0; x_in = x[N-1-r]; y_in = y[r];
    end
    @(negedge clk);
    start = 1'b0; x_in = 1'b0; y_in = 1'b0;
    clocks = N - 1;
    while (!done) begin
      @(negedge clk);
      clocks++;
    end
    if (sm) expected = (2*N)'($signed({{N{x[N-1]}}, x}) * $signed({{N{y[N-1]}}, y}));
    else    expected = (2*N)'({{N{1'b0}}, x} * {{N{1'b0}}, y});
    checks += 2;
    if (product !== expected) begin
      failures++;
      if (failures < 10) $display("FAIL N=%0d CLA=%0d %s x=%h y=%h product=%h expected=%h",
                                  N, USE_CLA, sm ? "signed" : "unsigned", x, y, product, expected);
    end
    if (clocks != N) begin
      failures++;
      if (failures < 10) $display("FAIL N=%0d latency %0d", N, clocks);
    end
  endtask

  initial begin
    finished = 1'b0; checks = 0; failures = 0;
    start = 1'b0; signed_mode = 1'b0; x_in = 1'b0; y_in = 1'b0;
    @(posedge rst_n);
    @(negedge clk);
    for (int m = 0; m < 2; m++) begin
      if (EXHAUSTIVE) begin
        for (longint x = 0; x < (longint'(1) << N); x++)
          for (longint y = 0; y < (longint'(1) << N); y++)
            run_op(N'(x), N'(y), m[0]);
      end else begin
        run_op('1, '1, m[0]);
        run_op('0, '1, m[0]);
        run_op({1'b1, {(N-1){1'b0}}}, {1'b1, {(N-1){1'b0}}}, m[0]);
        run_op({1'b0, {(N-1){1'b1}}}, {1'b1, {(N-1){1'b0}}}, m[0]);
        for (int k = 0; k < int'(NUM_RANDOM); k++)
          run_op(N'({$urandom, $urandom}), N'({$urandom, $urandom}), m[0]);
      end
    end
    finished = 1'b1;
  end

endmodule
