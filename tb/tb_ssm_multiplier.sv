// End-to-end testbench of the serial-serial multiplier at its default size
// (8 x 8, carry-lookahead final adder).
//
// Every pair of 8-bit operands is multiplied, first unsigned and then as
// two's complement numbers, each result compared with the product the
// testbench computes itself. Operands are fed the way the multiplier
// expects: X most significant bit first, Y least significant bit first,
// one bit per clock. The testbench also checks that `done` arrives exactly
// N clocks after the start edge and that a new operation is accepted as
// soon as `ready` returns, and it counts how often each mechanism of the
// design was exercised: unsigned and signed operations, inverted
// Baugh-Wooley terms, a fully loaded centre counter, back-to-back issue.
module tb_ssm_multiplier;

  localparam int unsigned N = 8;

  logic           clk = 1'b0;
  logic           rst_n;
  logic           start;
  logic           signed_mode;
  logic           x_in;
  logic           y_in;
  logic           ready;
  logic           done;
  logic [2*N-1:0] product;

  int checks   = 0;
  int failures = 0;

  int n_unsigned = 0;
  int n_signed   = 0;
  int n_inverted = 0;   // clocks in which a Baugh-Wooley term was inverted
  int n_full_ctr = 0;   // centre column counted N ones
  int n_back2back = 0;  // start issued in the clock the previous result appeared

  ssm_multiplier dut (
    .clk        (clk),
    .rst_n      (rst_n),
    .start      (start),
    .signed_mode(signed_mode),
    .x_in       (x_in),
    .y_in       (y_in),
    .ready      (ready),
    .done       (done),
    .product    (product)
  );

  always #5 clk = ~clk;

  // Clocks with at least one inverted partial-product gate: in signed mode
  // the first and the last bit cycles always invert some gate.
  always @(posedge clk) begin
    if (dut.run && dut.mode && (int'(dut.cycle) == 0 || int'(dut.cycle) == N - 1))
      n_inverted++;
    if (dut.latch_en && dut.u_acc.g_col[N-1].u_cnt.q == 4'(N))
      n_full_ctr++;
  end

  task automatic run_op(input logic [N-1:0] x, input logic [N-1:0] y,
                        input logic sm);
    logic [2*N-1:0] expected;
    int             clocks;
    // Called at a negedge; issue as soon as ready is seen.
    while (!ready) @(negedge clk);
    if (done) n_back2back++;
    start       = 1'b1;
    signed_mode = sm;
    x_in        = x[N-1];
    y_in        = y[0];
    for (int r = 1; r < N; r++) begin
      @(negedge clk);
      start = 1'b0;
      x_in  = x[N-1-r];
      y_in  = y[r];
    end
    @(negedge clk);
    start = 1'b0;
    x_in  = 1'b0;
    y_in  = 1'b0;
    // Here N-1 rising edges have passed since the start edge.
    clocks = N - 1;
    while (!done) begin
      @(negedge clk);
      clocks++;
    end
    if (sm) expected = 16'($signed(x) * $signed(y));
    else    expected = 16'(x * y);
    checks++;
    if (product !== expected) begin
      failures++;
      if (failures < 10)
        $display("FAIL %s x=%0d y=%0d product=%0h expected=%0h",
                 sm ? "signed" : "unsigned", x, y, product, expected);
    end
    checks++;
    if (clocks != N) begin
      failures++;
      if (failures < 10) $display("FAIL latency %0d clocks, expected %0d", clocks, N);
    end
    if (sm) n_signed++; else n_unsigned++;
  endtask

  initial begin
    rst_n       = 1'b1;
    #1 rst_n    = 1'b0;
    start       = 1'b0;
    signed_mode = 1'b0;
    x_in        = 1'b0;
    y_in        = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // The three examples published with the original design.
    run_op(8'd238, 8'd103, 1'b0);
    checks++; if (product !== 16'd24514) failures++;
    run_op(8'hF5, 8'd73, 1'b1);
    checks++; if ($signed(product) !== -16'sd803) failures++;
    run_op(8'd142, 8'd7, 1'b0);
    checks++; if (product !== 16'd994) failures++;

    for (int m = 0; m < 2; m++)
      for (int x = 0; x < (1 << N); x++)
        for (int y = 0; y < (1 << N); y++)
          run_op(N'(x), N'(y), m[0]);

    checks++; if (n_unsigned == 0)  begin failures++; $display("FAIL no unsigned operation"); end
    checks++; if (n_signed == 0)    begin failures++; $display("FAIL no signed operation"); end
    checks++; if (n_inverted == 0)  begin failures++; $display("FAIL no inverted term"); end
    checks++; if (n_full_ctr == 0)  begin failures++; $display("FAIL centre counter never full"); end
    checks++; if (n_back2back == 0) begin failures++; $display("FAIL no back-to-back issue"); end
    $display("mechanisms: unsigned=%0d signed=%0d inverted_clocks=%0d full_centre=%0d back_to_back=%0d",
             n_unsigned, n_signed, n_inverted, n_full_ctr, n_back2back);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
