// Testbench of the partial-product row generator.
//
// For random operands, the shift-register contents of every cycle r are
// built from the operand bits (X MSB first, Y LSB first) and the generated
// row is compared with a row computed directly from the index formulas:
// left column N-1+d holds x[N-1-r+d]*y[r], the centre x[N-1-r]*y[r], right
// column N-1-d holds x[N-1-r]*y[r-d], with the Baugh-Wooley inversion of
// every term that has exactly one of x[N-1], y[N-1] in signed mode. It
// also checks that the columns of all N rows, weighted by 2^c, add up to
// the product (plus the constant 2^(2N-1) - 2^N in signed mode).
module tb_pp_generator;

  localparam int unsigned N = 8;

  logic [N-1:0]         x_taps;
  logic [N-1:0]         y_taps;
  logic [$clog2(N)-1:0] cycle;
  logic                 run;
  logic                 signed_mode;
  logic [2*N-2:0]       pp;

  int checks   = 0;
  int failures = 0;

  pp_generator #(.N(N)) dut (
    .x_taps(x_taps), .y_taps(y_taps), .cycle(cycle), .run(run),
    .signed_mode(signed_mode), .pp(pp)
  );

  initial begin
    for (int t = 0; t < 2000; t++) begin
      logic [N-1:0] x, y;
      longint       total, expected_total;
      x = N'($urandom);
      y = N'($urandom);
      signed_mode = 1'(t & 1);
      run = 1'b1;
      total = 0;
      for (int r = 0; r < N; r++) begin
        logic [2*N-2:0] want;
        // Register contents in cycle r.
        for (int d = 0; d < N; d++) begin
          x_taps[d] = (d <= r) ? x[N-1-r+d] : 1'b0;
          y_taps[d] = (d <= r) ? y[r-d]     : 1'b0;
        end
        cycle = $clog2(N)'(r);
        want = '0;
        for (int d = 0; d <= r; d++) begin
          int xi, yj;
          // left (and centre for d = 0)
          xi = N - 1 - r + d; yj = r;
          want[N-1+d] = x[xi] & y[yj];
          if (signed_mode && ((xi == N-1) != (yj == N-1))) want[N-1+d] = ~want[N-1+d];
          if (d > 0) begin
            xi = N - 1 - r; yj = r - d;
            want[N-1-d] = x[xi] & y[yj];
            if (signed_mode && ((xi == N-1) != (yj == N-1))) want[N-1-d] = ~want[N-1-d];
          end
        end
        #1;
        checks++;
        if (pp != want) begin
          failures++;
          if (failures < 10) $display("FAIL x=%h y=%h r=%0d s=%0d pp=%b want=%b",
                                      x, y, r, signed_mode, pp, want);
        end
        for (int c = 0; c < 2 * N - 1; c++) if (pp[c]) total += longint'(1) << c;
      end
      if (signed_mode)
        expected_total = longint'($signed(x)) * longint'($signed(y))
                         + (longint'(1) << (2*N-1)) - (longint'(1) << N);
      else
        expected_total = longint'(x) * longint'(y);
      checks++;
      if (total != expected_total) begin
        failures++;
        if (failures < 10) $display("FAIL sum x=%h y=%h s=%0d total=%0d want=%0d",
                                    x, y, signed_mode, total, expected_total);
      end
      // With run low the row must be empty.
      run = 1'b0;
      #1;
      checks++;
      if (pp != '0) failures++;
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
