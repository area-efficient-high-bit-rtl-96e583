// Serial operand register: input D flip-flop plus an (N-1)-stage shift
// register.
//
// One operand bit arrives per clock. The input flip-flop holds the bit of
// the current cycle (taps[0]); the shift register behind it keeps the bits
// of the previous cycles, taps[d] being the bit received d cycles ago. The
// multiplier uses one instance for X (drawn shifting left) and one for Y
// (drawn shifting right); the direction only says on which side of the
// centre the stages sit, the logic is the same.
//
// Interface: `load` starts an operand (captures d_in, clears the stored
// bits so no stale bit forms a partial product), `shift` captures d_in and
// moves every stored bit one stage on. With neither, the register holds.
// Timing: all updates on the rising clock edge; taps are flip-flop outputs.
module operand_shift_reg #(
  parameter int unsigned N = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic         shift,
  input  logic         d_in,
  output logic [N-1:0] taps
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      taps <= '0;
    end else if (load) begin
      taps <= {{(N-1){1'b0}}, d_in};
    end else if (shift) begin
      taps <= {taps[N-2:0], d_in};
    end
  end

endmodule
