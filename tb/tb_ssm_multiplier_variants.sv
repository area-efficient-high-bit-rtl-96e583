// Testbench of the multiplier's other configurations.
//
// The 8 x 8 multiplier with the ripple-carry final adder (the alternative
// to the default carry-lookahead adder) is checked on every operand pair in
// both modes, as the default configuration is in tb_ssm_multiplier. The
// operand width is a parameter, so the same structure is also checked at
// N = 4 (every pair), N = 5 (odd width) and N = 16 (random pairs), with
// both final adders.
module tb_ssm_multiplier_variants;

  logic clk = 1'b0;
  logic rst_n;

  always #5 clk = ~clk;

  localparam int A = 6;
  logic [A-1:0] fin;
  int           chk [A];
  int           bad [A];

  ssm_check_agent #(.N(8),  .USE_CLA(1'b0), .EXHAUSTIVE(1'b1)) a_rca8 (
    .clk(clk), .rst_n(rst_n), .finished(fin[0]), .checks(chk[0]), .failures(bad[0]));
  ssm_check_agent #(.N(4),  .USE_CLA(1'b1), .EXHAUSTIVE(1'b1)) a_cla4 (
    .clk(clk), .rst_n(rst_n), .finished(fin[1]), .checks(chk[1]), .failures(bad[1]));
  ssm_check_agent #(.N(4),  .USE_CLA(1'b0), .EXHAUSTIVE(1'b1)) a_rca4 (
    .clk(clk), .rst_n(rst_n), .finished(fin[2]), .checks(chk[2]), .failures(bad[2]));
  ssm_check_agent #(.N(5),  .USE_CLA(1'b1), .EXHAUSTIVE(1'b1)) a_cla5 (
    .clk(clk), .rst_n(rst_n), .finished(fin[3]), .checks(chk[3]), .failures(bad[3]));
  ssm_check_agent #(.N(16), .USE_CLA(1'b1), .NUM_RANDOM(3000)) a_cla16 (
    .clk(clk), .rst_n(rst_n), .finished(fin[4]), .checks(chk[4]), .failures(bad[4]));
  ssm_check_agent #(.N(16), .USE_CLA(1'b0), .NUM_RANDOM(3000)) a_rca16 (
    .clk(clk), .rst_n(rst_n), .finished(fin[5]), .checks(chk[5]), .failures(bad[5]));

  int checks   = 0;
  int failures = 0;

  initial begin
    rst_n = 1'b1;
    #1 rst_n = 1'b0;
    #20 rst_n = 1'b1;
    wait (&fin);
    for (int i = 0; i < A; i++) begin
      checks   += chk[i];
      failures += bad[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
