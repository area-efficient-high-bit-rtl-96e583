// Testbench of the asynchronous 1's counter.
//
// A 3-bit counter is fed random input bits for several hundred clock
// pulses; after every pulse its value must equal the number of 1's seen so
// far modulo 8, so wrap-around is covered. The asynchronous clear is
// exercised in the middle of the run and must bring the count to zero at
// once, without a clock pulse.
module tb_ones_counter;

  localparam int unsigned W = 3;

  logic         clk = 1'b0;
  logic         in;
  logic         rst_n;
  logic [W-1:0] q;

  int checks   = 0;
  int failures = 0;
  int ones     = 0;

  ones_counter #(.W(W)) dut (.clk(clk), .in(in), .rst_n(rst_n), .q(q));

  initial begin
    in    = 1'b0;
    rst_n = 1'b1; #1 rst_n = 1'b0;
    #10 rst_n = 1'b1;
    for (int k = 0; k < 400; k++) begin
      in = 1'($urandom);
      #5 clk = 1'b1;
      if (in) ones++;
      #5 clk = 1'b0;
      checks++;
      if (q != W'(ones)) begin
        failures++;
        if (failures < 10) $display("FAIL pulse %0d: q=%0d expected %0d", k, q, ones % 8);
      end
      if (k == 200) begin
        in = 1'b0;
        rst_n = 1'b0;
        #1;
        checks++;
        if (q != '0) begin failures++; $display("FAIL clear: q=%0d", q); end
        #4 rst_n = 1'b1;
        ones = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
