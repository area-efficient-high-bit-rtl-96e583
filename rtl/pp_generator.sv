// Partial-product row generator of the serial-serial algorithm.
//
// X is fed MSB first and Y LSB first, so in cycle r the input flip-flops
// hold x[N-1-r] and y[r]. With x_taps/y_taps from the two operand shift
// registers, the partial-product row PP_r is formed by
// 2N-1 AND gates whose columns never change:
//   centre  x_taps[0] & y_taps[0]  -> column N-1    (PP_r^C)
//   left d  y_taps[0] & x_taps[d]  -> column N-1+d  (PP_r^L, stored X bits)
//   right d x_taps[0] & y_taps[d]  -> column N-1-d  (PP_r^R, stored Y bits)
// Stages not yet filled hold 0, so the row grows like the pyramid of the
// serial-serial partial-product order.
//
// Signed mode (Baugh-Wooley): the terms x[N-1]*y[j] and
// x[i]*y[N-1] with i, j < N-1 enter inverted. x[N-1] is the first X bit, so
// it sits at the centre in cycle 0 and at left stage d = r in cycle r;
// y[N-1] is the last Y bit, present in cycle N-1 at the centre and at every
// left gate. The gate at left stage N-1 in cycle N-1 forms x[N-1]*y[N-1]
// and stays a plain AND. Right-hand gates never see x[N-1] or y[N-1]. Which
// gates invert is this design's derivation from the Baugh-Wooley
// equation. The constant 2^N - 2^(2N-1) of that equation is
// added later, in the accumulator.
//
// Interface: combinational; pp is forced to 0 when run is low. cycle is r.
module pp_generator #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0]         x_taps,
  input  logic [N-1:0]         y_taps,
  input  logic [$clog2(N)-1:0] cycle,
  input  logic                 run,
  input  logic                 signed_mode,
  output logic [2*N-2:0]       pp
);

  localparam logic [$clog2(N)-1:0] LAST = $clog2(N)'(N - 1);

  always_comb begin
    logic inv;
    // Centre gate.
    inv = signed_mode && (cycle == '0 || cycle == LAST);
    pp[N-1] = run & ((x_taps[0] & y_taps[0]) ^ inv);
    for (int unsigned d = 1; d < N; d++) begin
      // Left gate d: current y bit with the X bit received d cycles ago.
      inv = signed_mode &&
            ((cycle == $clog2(N)'(d) && cycle != LAST) ||
             (cycle == LAST && d != N - 1));
      pp[N-1+d] = run & ((y_taps[0] & x_taps[d]) ^ inv);
      // Right gate d: current x bit with the Y bit received d cycles ago.
      pp[N-1-d] = run & x_taps[0] & y_taps[d];
    end
  end

endmodule
