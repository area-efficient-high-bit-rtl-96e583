// Testbench of the serial operand register.
//
// Random bit streams are loaded and shifted; after each clock every tap
// must hold the bit received that many clocks earlier, and zero for stages
// not yet filled since the last load. Holding (neither load nor shift)
// must keep all taps.
module tb_operand_shift_reg;

  localparam int unsigned N = 8;

  logic         clk = 1'b0;
  logic         rst_n;
  logic         load;
  logic         shift;
  logic         d_in;
  logic [N-1:0] taps;

  int checks   = 0;
  int failures = 0;
  logic [N-1:0] model;

  operand_shift_reg #(.N(N)) dut (
    .clk(clk), .rst_n(rst_n), .load(load), .shift(shift), .d_in(d_in), .taps(taps)
  );

  always #5 clk = ~clk;

  initial begin
    rst_n = 1'b1; #1 rst_n = 1'b0; load = 1'b0; shift = 1'b0; d_in = 1'b0; model = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 500; k++) begin
      int sel;
      sel   = int'($urandom_range(0, 9));
      load  = (sel == 0);
      shift = (sel >= 2);
      d_in  = 1'($urandom);
      @(posedge clk);
      if (load)       model = {{(N-1){1'b0}}, d_in};
      else if (shift) model = {model[N-2:0], d_in};
      @(negedge clk);
      checks++;
      if (taps != model) begin
        failures++;
        if (failures < 10) $display("FAIL step %0d: taps=%b expected %b", k, taps, model);
      end
    end
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
