// Testbench of the carry-lookahead adder.
//
// Random operand pairs and the corner cases (all zeros, all ones, a carry
// that runs through every bit) are added at two widths, the 16 bits of the
// 8 x 8 product and an odd width of 13; sum and carry out are compared with
// the testbench's own addition.
module tb_cla_adder;

  logic [15:0] a16, b16, s16;
  logic        ci16, co16;
  logic [12:0] a13, b13, s13;
  logic        ci13, co13;

  int checks   = 0;
  int failures = 0;

  cla_adder #(.W(16)) dut16 (.a(a16), .b(b16), .cin(ci16), .sum(s16), .cout(co16));
  cla_adder #(.W(13)) dut13 (.a(a13), .b(b13), .cin(ci13), .sum(s13), .cout(co13));

  task automatic check_once();
    logic [16:0] e16;
    logic [13:0] e13;
    #1;
    e16 = 17'(a16) + 17'(b16) + 17'(ci16);
    e13 = 14'(a13) + 14'(b13) + 14'(ci13);
    checks += 2;
    if ({co16, s16} != e16) begin
      failures++;
      if (failures < 10) $display("FAIL W=16 %h+%h+%0d = %h, expected %h", a16, b16, ci16, {co16, s16}, e16);
    end
    if ({co13, s13} != e13) begin
      failures++;
      if (failures < 10) $display("FAIL W=13 %h+%h+%0d = %h, expected %h", a13, b13, ci13, {co13, s13}, e13);
    end
  endtask

  initial begin
    a16 = '0; b16 = '0; ci16 = 0; a13 = '0; b13 = '0; ci13 = 0; check_once();
    a16 = '1; b16 = '1; ci16 = 1; a13 = '1; b13 = '1; ci13 = 1; check_once();
    a16 = '1; b16 = '0; ci16 = 1; a13 = '1; b13 = '0; ci13 = 1; check_once();
    a16 = 16'h5555; b16 = 16'hAAAB; ci16 = 0; a13 = 13'h0AAA; b13 = 13'h1556; ci13 = 0; check_once();
    for (int k = 0; k < 20000; k++) begin
      a16 = 16'($urandom); b16 = 16'($urandom); ci16 = 1'($urandom);
      a13 = 13'($urandom); b13 = 13'($urandom); ci13 = 1'($urandom);
      check_once();
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
