// Shared constants and helper functions of the serial-serial multiplier.
//
// The multiplier forms, in cycle r of an N-cycle operation, one row of
// partial-product bits spread over 2N-1 columns (column c has weight 2^c).
// Column N-1 is fed by the centre AND gate, column N-1+d by the d-th stage
// of the X (left) shift register and column N-1-d by the d-th stage of the
// Y (right) shift register. Column c therefore receives at most
// N - |c - (N-1)| one-bits per operation, which fixes the width of its
// 1's counter: for N = 8 the widths from the outermost left column to the
// outermost right column are 1,2,2,3,3,3,3,4,3,3,3,3,2,2,1.
package ssm_pkg;

  // Operand width of the main configuration (8 x 8).
  localparam int unsigned N_DEFAULT = 8;

  // Ceiling of log2(v): bits needed to hold the values 0 .. v-1.
  function automatic int unsigned clog2_u(int unsigned v);
    int unsigned r;
    r = 0;
    for (int unsigned i = 0; i < 32; i++) begin
      if ((32'd1 << i) < v) r = i + 1;
    end
    return r;
  endfunction

  // Largest number of partial-product ones that column c can receive.
  function automatic int unsigned col_max_ones(int unsigned n, int unsigned c);
    int d;
    d = int'(c) - int'(n) + 1;
    if (d < 0) d = -d;
    return n - d;
  endfunction

  // Width of the 1's counter of column c.
  function automatic int unsigned col_width(int unsigned n, int unsigned c);
    return clog2_u(col_max_ones(n, c) + 1);
  endfunction

  // Offset of column c's counter bits inside the packed vector that holds
  // all counter values, column 0 at the least significant end.
  function automatic int unsigned col_offset(int unsigned n, int unsigned c);
    int unsigned s;
    s = 0;
    for (int unsigned k = 0; k < c; k++) s += col_width(n, k);
    return s;
  endfunction

  // Total number of counter bits over all 2n-1 columns.
  function automatic int unsigned total_count_bits(int unsigned n);
    return col_offset(n, 2 * n - 1);
  endfunction

  // Widest counter (the centre column); also the number of bit-plane rows.
  function automatic int unsigned max_count_width(int unsigned n);
    return clog2_u(n + 1);
  endfunction

endpackage
