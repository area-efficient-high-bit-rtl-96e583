// Testbench of the latching register.
//
// Random data is presented every clock with a random enable; the output
// must change only at enabled edges, to the data present at that edge, and
// reset must clear it.
module tb_latching_register;

  localparam int unsigned W = 39;

  logic         clk = 1'b0;
  logic         rst_n;
  logic         en;
  logic [W-1:0] d;
  logic [W-1:0] q;
  logic [W-1:0] model;

  int checks   = 0;
  int failures = 0;

  latching_register #(.W(W)) dut (.clk(clk), .rst_n(rst_n), .en(en), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin
    rst_n = 1'b1; #1 rst_n = 1'b0; en = 1'b0; d = '1; model = '0;
    @(negedge clk);
    checks++;
    if (q != '0) failures++;
    rst_n = 1'b1;
    for (int k = 0; k < 1000; k++) begin
      en = ($urandom_range(0, 3) == 0);
      d  = {7'($urandom), 32'($urandom)};
      @(posedge clk);
      if (en) model = d;
      @(negedge clk);
      checks++;
      if (q != model) begin
        failures++;
        if (failures < 10) $display("FAIL step %0d q=%h expected %h", k, q, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
