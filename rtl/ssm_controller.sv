// Sequencer of the serial-serial multiplier.
//
// An operation takes N bit cycles. `start` (accepted while `ready`) marks
// the cycle edge at which the first bit pair, x[N-1] and y[0], is taken;
// the next N-1 bit pairs follow on consecutive edges. During the N bit
// cycles `run` is high, `cycle` gives r = 0..N-1, and the 1's counters are
// out of reset (cnt_clr_n = 1, a flip-flop that rises and falls with
// `run`). At the edge that ends cycle N-1,
// `latch_en` is high so the latching register captures the final counts;
// the controller then returns to idle, which holds the counters cleared.
// A new operation can therefore start one cycle after the previous one's
// last bit cycle: N bit cycles plus one clearing cycle per product.
// `done` pulses during the cycle after the latch edge, when `product` of
// the multiplier is valid.
//
// cnt_clr_n is set, not cleared, by rst_n: the counters are cleared by
// rst_n itself during reset, and the first idle clock afterwards gives
// them one more clearing edge; `ready` stays low until that edge has
// happened, i.e. for the first clock after reset. The edge also brings
// two-state simulators, which start every flip-flop at an arbitrary value,
// into the reset state.
//
// The original design names two clocks (Clk1 for the shift registers, clk2 for the
// latching register) but not how they are produced; here both are the one
// clock, with latch_en marking clk2's edge. The clearing cycle is this
// design's choice: an asynchronous counter must be cleared while no count
// pulse can arrive.
module ssm_controller #(
  parameter int unsigned N = 8
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic                 signed_mode,
  output logic                 ready,
  output logic                 load,
  output logic                 shift,
  output logic                 run,
  output logic [$clog2(N)-1:0] cycle,
  output logic                 mode,
  output logic                 cnt_clr_n,
  output logic                 latch_en,
  output logic                 done
);

  typedef enum logic {S_IDLE, S_RUN} state_t;

  localparam logic [$clog2(N)-1:0] LAST = $clog2(N)'(N - 1);

  state_t state;

  assign ready     = (state == S_IDLE) & ~cnt_clr_n;
  assign run       = (state == S_RUN);
  assign load      = ready & start;
  assign shift     = run & (cycle != LAST);
  assign latch_en  = run & (cycle == LAST);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      cycle     <= '0;
      mode      <= 1'b0;
      done      <= 1'b0;
      cnt_clr_n <= 1'b1;
    end else begin
      done      <= latch_en;
      // Counters run exactly while the next state is S_RUN.
      cnt_clr_n <= (ready & start) | (run & (cycle != LAST));
      unique case (state)
        S_IDLE: if (ready && start) begin
          state <= S_RUN;
          cycle <= '0;
          mode  <= signed_mode;
        end
        S_RUN: begin
          if (cycle == LAST) state <= S_IDLE;
          else               cycle <= cycle + 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // Protocol rules: a result follows every latch one clock later, the
  // counters are never released outside the N bit cycles, and an operation
  // runs exactly N bit cycles before ready returns.
  a_done_after_latch: assert property (@(posedge clk) disable iff (!rst_n)
    latch_en |=> done);
  a_clear_when_idle: assert property (@(posedge clk) disable iff (!rst_n)
    (state == S_IDLE) ##1 (state == S_IDLE) |-> !cnt_clr_n);
  a_count_when_run: assert property (@(posedge clk) disable iff (!rst_n)
    run |-> cnt_clr_n);
  a_n_cycles: assert property (@(posedge clk) disable iff (!rst_n)
    load |=> (run [*N]) ##1 ready);

endmodule
