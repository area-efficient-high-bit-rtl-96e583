// Testbench of the carry-save reduction.
//
// Random sets of 5, 4 and 3 rows of 16 bits are reduced to two rows; the
// two rows must add up, modulo 2^16, to the sum of all input rows. With
// rows shaped like the counter bit-planes of the multiplier the true sum
// fits in 16 bits, so the check is exact for them.
module tb_csa_tree;

  localparam int unsigned W = 16;

  logic [4:0][W-1:0] r5;
  logic [3:0][W-1:0] r4;
  logic [2:0][W-1:0] r3;
  logic [W-1:0] s5, c5, s4, c4, s3, c3;

  int checks   = 0;
  int failures = 0;

  csa_tree #(.W(W), .ROWS(5)) dut5 (.rows(r5), .sum(s5), .carry(c5));
  csa_tree #(.W(W), .ROWS(4)) dut4 (.rows(r4), .sum(s4), .carry(c4));
  csa_tree #(.W(W), .ROWS(3)) dut3 (.rows(r3), .sum(s3), .carry(c3));

  initial begin
    for (int k = 0; k < 20000; k++) begin
      logic [W-1:0] e5, e4, e3;
      for (int i = 0; i < 5; i++) r5[i] = W'($urandom);
      for (int i = 0; i < 4; i++) r4[i] = W'($urandom);
      for (int i = 0; i < 3; i++) r3[i] = W'($urandom);
      #1;
      e5 = r5[0] + r5[1] + r5[2] + r5[3] + r5[4];
      e4 = r4[0] + r4[1] + r4[2] + r4[3];
      e3 = r3[0] + r3[1] + r3[2];
      checks += 3;
      if (W'(s5 + c5) != e5) begin failures++; if (failures < 10) $display("FAIL 5 rows k=%0d", k); end
      if (W'(s4 + c4) != e4) begin failures++; if (failures < 10) $display("FAIL 4 rows k=%0d", k); end
      if (W'(s3 + c3) != e3) begin failures++; if (failures < 10) $display("FAIL 3 rows k=%0d", k); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
