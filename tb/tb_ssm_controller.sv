// Testbench of the multiplier's sequencer.
//
// Starts operations at random times (also while busy, when start must be
// ignored) and checks, clock by clock, against a reference sequence: load
// in bit cycle 0, shift in cycles 1..N-1, cycle index, counters released
// only while running, latch_en in the last bit cycle, done one clock later,
// ready again in the clock after the last bit cycle, mode held from start.
module tb_ssm_controller;

  localparam int unsigned N = 8;

  logic                 clk = 1'b0;
  logic                 rst_n;
  logic                 start;
  logic                 signed_mode;
  logic                 ready, load, shift, run, mode, cnt_clr_n, latch_en, done;
  logic [$clog2(N)-1:0] cycle;

  int checks   = 0;
  int failures = 0;
  int n_ops    = 0;

  ssm_controller #(.N(N)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .signed_mode(signed_mode),
    .ready(ready), .load(load), .shift(shift), .run(run), .cycle(cycle),
    .mode(mode), .cnt_clr_n(cnt_clr_n), .latch_en(latch_en), .done(done)
  );

  always #5 clk = ~clk;

  // Reference: r = -1 idle, else bit cycle r.
  int   r_ref;
  logic mode_ref;
  logic done_ref;

  task automatic expect_bit(string what, logic got, logic want);
    checks++;
    if (got !== want) begin
      failures++;
      if (failures < 20) $display("FAIL %s=%0d expected %0d (r=%0d)", what, got, want, r_ref);
    end
  endtask

  initial begin
    rst_n = 1'b1; #1 rst_n = 1'b0; start = 1'b0; signed_mode = 1'b0;
    r_ref = -1; mode_ref = 1'b0; done_ref = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 2000; k++) begin
      start       = ($urandom_range(0, 2) == 0);
      signed_mode = 1'($urandom);
      #1;
      // Combinational outputs in the current clock.
      // First clock after reset: the counters' clear is still to come, so
      // the controller is not ready yet.
      expect_bit("ready", ready, (r_ref < 0) && (k > 0));
      expect_bit("run", run, r_ref >= 0);
      expect_bit("cnt_clr_n", cnt_clr_n, (r_ref >= 0) || (k == 0));
      expect_bit("load", load, (r_ref < 0) && (k > 0) && start);
      expect_bit("shift", shift, (r_ref >= 0) && (r_ref < N - 1));
      expect_bit("latch_en", latch_en, r_ref == N - 1);
      expect_bit("done", done, done_ref);
      if (r_ref >= 0) begin
        checks++;
        if (int'(cycle) != r_ref) begin failures++; $display("FAIL cycle=%0d expected %0d", cycle, r_ref); end
        expect_bit("mode", mode, mode_ref);
      end
      @(posedge clk);
      done_ref = (r_ref == N - 1);
      if (r_ref < 0) begin
        if (start && k > 0) begin r_ref = 0; mode_ref = signed_mode; n_ops++; end
      end else if (r_ref == N - 1) r_ref = -1;
      else r_ref++;
      @(negedge clk);
    end
    checks++;
    if (n_ops < 10) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
