# Serial-serial multiplier with asynchronous 1's counters

A bit-serial multiplier normally needs 2n clocks to build the partial
products of an n x n multiplication. The serial-serial algorithm in this
design needs only n clocks. It feeds the two operands in opposite bit orders:
X arrives most significant bit first and Y least significant bit first. Every
partial-product bit then lands in a column that never changes, so no adder
sits in the per-bit path. Each column has a small asynchronous (ripple) 1's
counter that counts how many partial-product ones the column receives. The
per-bit critical path is one AND gate and one flip-flop. After the n-th clock
the counts are latched. A carry-save stage reduces them to two rows, and one
carry-propagate adder turns them into the 2n-bit product. Unsigned and
two's-complement (Baugh-Wooley) multiplication use the same hardware. A mode
bit selects between them.

The default configuration is 8 x 8 with a carry-lookahead final adder. The
operand width `N` and the final adder (`USE_CLA`) are parameters.

## The partial-product pyramid

Let X = x[n-1..0] and Y = y[n-1..0]. In cycle r (r = 0 .. n-1) the input
flip-flops hold x[n-1-r] and y[r]. Two shift registers keep the earlier bits:

* the X (left) register holds at stage d the X bit that arrived d cycles ago,
  which is x[n-1-r+d];
* the Y (right) register holds at stage d the Y bit that arrived d cycles ago,
  which is y[r-d].

A row of 2n-1 AND gates forms the partial-product row of cycle r:

| gate            | inputs                           | term               | weight      |
|-----------------|----------------------------------|--------------------|-------------|
| centre          | current x, current y             | x[n-1-r]·y[r]      | 2^(n-1)     |
| left stage d    | current y, X stage d             | x[n-1-r+d]·y[r]    | 2^(n-1+d)   |
| right stage d   | current x, Y stage d             | x[n-1-r]·y[r-d]    | 2^(n-1-d)   |

The weight of each gate does not depend on r. Gate "left d" always adds into
column n-1+d, gate "right d" always into column n-1-d. Stages that have not
been filled yet hold 0, so row r has 2r+1 possible ones. Over the n cycles the
rows form a pyramid that contains each of the n² products x[i]·y[j] exactly
once. For n = 8:

```
cycle 0:                      x7y0
cycle 1:                 x7y1 x6y1 x6y0
cycle 2:            x7y2 x6y2 x5y2 x5y1 x5y0
  ...
cycle 7: x7y7 x6y7 x5y7 x4y7 x3y7 x2y7 x1y7 x0y7 x0y6 x0y5 ... x0y0
```

Column c receives at most n - |c - (n-1)| ones, so its counter needs
ceil(log2(n - |c-(n-1)| + 1)) bits. For n = 8 the widths from the most
significant column down are 1, 2, 2, 3, 3, 3, 3, 4, 3, 3, 3, 3, 2, 2, 1. That
makes 38 counter bits in total.

## Signed mode

Two's-complement operands use the Baugh-Wooley form:

```
X·Y = Σ(i,j<n-1) x[i]y[j]·2^(i+j) + x[n-1]y[n-1]·2^(2n-2)
    + 2^(n-1)·( Σ(i<n-1) ~(x[i]y[n-1])·2^i + Σ(j<n-1) ~(x[n-1]y[j])·2^j )
    + 2^n - 2^(2n-1)
```

Every product that contains exactly one sign bit enters inverted. In the
serial schedule these products sit at fixed gates:

* x[n-1] is the first X bit. It is at the centre in cycle 0 and at left
  stage d = r in cycle r.
* y[n-1] is the last Y bit. It meets every X bit in cycle n-1, at the centre
  and at all left stages.
* x[n-1]·y[n-1] is at left stage n-1 in cycle n-1 and is not inverted.
* The right-hand gates never see a sign bit.

`pp_generator` therefore turns an AND into a NAND when `mode` is set and
either (cycle = 0 or n-1, centre gate), or (left stage d = r with r < n-1),
or (cycle n-1, left stage d < n-1). The constant 2^n - 2^(2n-1) is added as
an extra row in the carry-save stage. It is written modulo 2^(2n) as
2^n + 2^(2n-1). The column maxima are the same as in unsigned mode, so the
counters need no extra width.

## Counting, latching and the adder stages

`ones_counter` is a ripple counter. The AND of the counting clock and the
column's partial-product bit clocks a toggle flip-flop. Each further stage
toggles when the Q-bar of the stage before it rises. The counting clock is
the inverted system clock:

* partial-product bits change just after the rising edge, because they come
  from the operand flip-flops;
* the counters count on the falling edge, half a cycle later, when their
  input is stable;
* the ripple through at most log2(n+1) stages must settle before the next
  falling edge, or before the latch edge after the last cycle.

The latching register captures all counts plus the mode at the rising edge
that ends cycle n-1. The adder stages then work from the latch while the
counters are cleared. Bit b of column c's count has weight 2^(c+b). The
counts therefore form `clog2(n+1)` rows of bits: for n = 8, four rows of 15,
13, 9 and 1 bits. In signed mode the constant row is added to these. A chain
of 3:2 carry-save rows (`csa_tree`) reduces them to a sum row and a carry
row. The final adder is either a carry-lookahead adder (`cla_adder`, a
Kogge-Stone tree of generate/propagate operators) or a ripple-carry adder
(`rca_adder`).

## Interface and timing

`ssm_multiplier #(N = 8, USE_CLA = 1)`

| port          | dir | width | meaning |
|---------------|-----|-------|---------|
| `clk`         | in  | 1     | bit clock |
| `rst_n`       | in  | 1     | asynchronous reset, active low |
| `start`       | in  | 1     | first bit pair is on `x_in`/`y_in`; taken while `ready` |
| `signed_mode` | in  | 1     | 1: operands are two's complement; sampled with `start` |
| `x_in`        | in  | 1     | X, most significant bit first |
| `y_in`        | in  | 1     | Y, least significant bit first |
| `ready`       | out | 1     | a new operation may start |
| `done`        | out | 1     | one-clock pulse: `product` has a new result |
| `product`     | out | 2N    | last result, two's complement in signed mode |

```
edge:      E0      E1      ...     E7      E8      E9
x_in/y_in  x7,y0   x6,y1   ...     x0,y7   -       next x7,y0 (start)
counting   cyc 0   cyc 1   ...     cyc 7   clear
latch                                      ^E8
done/product                               valid from E8
ready      1 -> 0                          1
```

`ready` is low for the first clock after reset. In that clock the counters
receive one more clearing edge. After that, a result appears exactly N
clocks after the start edge. It holds until the next result. After the n bit cycles, one clock holds the counters in their
asynchronous clear. A new operation can therefore start every N+1 clocks. The
testbench starts each new operation in the same clock in which the previous
`done` appears.

With N = 8, coarse synthesis in yosys gives about 330 word-level cells and
100 flip-flop bits: 38 counter bits, 39 latch bits, 16 operand bits and 7
control bits.

## Design choices beyond the algorithm

The algorithm and the block structure follow the published serial-serial
multiplier. The following choices are this implementation's own:

* **Clearing clock.** An asynchronous counter can only be cleared safely
  while no count pulse can arrive. The design therefore spends one clock per
  product on clearing, so the issue interval is N+1 clocks, not N. Partial
  products are still formed in N clocks. A continuous operand stream needs
  one idle clock between products.
* **One clock.** The original drawing uses separate clocks for the shift
  registers and the latching register. Here both are the same clock, and the
  latch uses an enable.
* **Falling-edge counting.** The counters count on the falling edge, so the
  counter inputs are stable whenever they are clocked.
* **Mode as an input.** Signed and unsigned operation share one datapath.
  The mode is a run-time input rather than two separate builds.
* **Signed datapath derived from the equation.** The signed gate map above
  comes from the Baugh-Wooley equation. It was not copied from a published
  schematic.
* **Full-width signed product.** The signed product keeps all 2N bits.
  (-2^(N-1))² = 2^(2N-2) needs the top bit, even though a (2N-1)-bit bus
  covers every other case.
* **Adder arrangements.** The carry-save stage is a chain rather than a
  Wallace tree; for 4-5 rows the depth is the same. The carry-lookahead
  adder's tree is Kogge-Stone.
* **Ripple clocks.** The counters are ripple counters with derived clocks,
  as intended: flip-flop i is clocked by stage i-1. Static timing and FPGA
  flows need these declared as generated clocks, or the counters replaced by
  synchronous ones (this changes nothing else).

The published area figures (FPGA slices for RCA and CLA variants) cannot be
reproduced from RTL alone and are not claimed here.

## Files

`rtl/`:

| file | contents |
|------|----------|
| `ssm_pkg.sv` | column widths and offsets of the counters |
| `ssm_multiplier.sv` | top level |
| `ssm_controller.sv` | bit-cycle sequencer, with protocol assertions |
| `operand_shift_reg.sv` | input flip-flop + shift register (used for X and Y) |
| `pp_generator.sv` | 2N-1 AND/NAND gates of one partial-product row |
| `serial_accumulator.sv` | column counters, latch, bit-plane rows, CSA, final adder |
| `ones_counter.sv` | asynchronous 1's counter |
| `latching_register.sv` | enabled register for the counts |
| `csa_tree.sv`, `csa_3to2.sv` | carry-save reduction |
| `cla_adder.sv`, `rca_adder.sv` | final carry-propagate adders |

`tb/` has one self-checking testbench per module, `tb_<module>.sv`.
`csa_3to2` is covered by `tb_csa_tree`. Each testbench prints
`TB_RESULT checks=<n> failures=<n>`.

* `tb_ssm_multiplier` runs the default 8 x 8 CLA build on all 65,536
  operand pairs, unsigned and signed. It also runs the three worked
  examples 238·103 = 24514, -11·73 = -803 and 142·7 = 994. It checks the
  N-clock latency and issues back to back. It counts how often each
  mechanism occurred: signed inversion, a full centre counter, back-to-back
  issue.
* `tb_ssm_multiplier_variants` checks other builds through the helper
  `ssm_check_agent.sv`. It runs the RCA build exhaustively at N = 8, N = 4
  and N = 5 exhaustively, and N = 16 with random pairs.

Running a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb \
    --top-module tb_ssm_multiplier rtl/ssm_pkg.sv tb/tb_ssm_multiplier.sv
./obj_dir/Vtb_ssm_multiplier
```

The exhaustive top-level run takes about a second. The variants run takes
about fifteen seconds. Reset is applied by each testbench, and the design
reads no uninitialised state after reset, so two-state simulation with
random initial values is fine.
