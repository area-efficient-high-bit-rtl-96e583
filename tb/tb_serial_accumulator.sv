// Testbench of the counter-based serial accumulator.
//
// For each operation, N clocks of random partial-product rows are fed to
// two accumulators (carry-lookahead and ripple-carry final adder). Column
// c may carry a 1 only in the cycles where the multiplier can drive it
// (from cycle |c-(N-1)| on), so no counter overflows. The testbench
// sequences clear, counting and latching like the multiplier's controller
// and expects the product output to equal the weighted column sum (plus
// 2^N + 2^(2N-1) modulo 2^(2N) in signed mode) from the clock after the
// latch edge, and to stay unchanged while the next operation is counted.
module tb_serial_accumulator;

  localparam int unsigned N = 8;

  logic           clk = 1'b0;
  logic           rst_n;
  logic [2*N-2:0] pp;
  logic           cnt_clr_n;
  logic           latch_en;
  logic           mode;
  logic [2*N-1:0] product_cla, product_rca;

  int checks   = 0;
  int failures = 0;

  serial_accumulator #(.N(N), .USE_CLA(1'b1)) dut_cla (
    .clk(clk), .rst_n(rst_n), .pp(pp), .cnt_clr_n(cnt_clr_n),
    .latch_en(latch_en), .mode(mode), .product(product_cla)
  );
  serial_accumulator #(.N(N), .USE_CLA(1'b0)) dut_rca (
    .clk(clk), .rst_n(rst_n), .pp(pp), .cnt_clr_n(cnt_clr_n),
    .latch_en(latch_en), .mode(mode), .product(product_rca)
  );

  always #5 clk = ~clk;

  task automatic check_product(logic [2*N-1:0] want, string when);
    checks += 2;
    if (product_cla !== want) begin
      failures++;
      if (failures < 10) $display("FAIL CLA %s product=%h expected %h", when, product_cla, want);
    end
    if (product_rca !== want) begin
      failures++;
      if (failures < 10) $display("FAIL RCA %s product=%h expected %h", when, product_rca, want);
    end
  endtask

  initial begin
    logic [2*N-1:0] prev;
    rst_n = 1'b1; cnt_clr_n = 1'b1; #1 rst_n = 1'b0; pp = '0; cnt_clr_n = 1'b0; latch_en = 1'b0; mode = 1'b0;
    prev = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int op = 0; op < 3000; op++) begin
      logic [2*N-1:0] want;
      logic           all_ones;
      all_ones = (op % 97 == 5);
      want = '0;
      mode = 1'(op & 1);
      for (int r = 0; r < N; r++) begin
        // Inputs change just after the rising edge, as flip-flop outputs
        // of the multiplier do; the counters count at the falling edge.
        @(posedge clk);
        #1;
        check_product(prev, "hold");
        cnt_clr_n = 1'b1;
        for (int c = 0; c < 2 * N - 1; c++) begin
          int d;
          d = c - (N - 1);
          if (d < 0) d = -d;
          pp[c] = (r >= d) ? (all_ones ? 1'b1 : 1'($urandom)) : 1'b0;
          if (pp[c]) want += (2*N)'(1) << c;
        end
        latch_en = (r == N - 1);
      end
      if (mode) want += ((2*N)'(1) << N) + ((2*N)'(1) << (2*N-1));
      // Latch edge, then one clearing clock: counters held in reset,
      // result visible.
      @(posedge clk);
      #1;
      cnt_clr_n = 1'b0;
      latch_en  = 1'b0;
      pp        = '0;
      #1;
      check_product(want, "result");
      prev = want;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
