# Floating-point FIR and IIR filters built from pipelined arithmetic units

This RTL implements digital filters whose arithmetic is IEEE 754 single
precision. Every adder and multiplier is pipelined, with one register at its
output. A pipelined unit delays its result by one clock, and so does a filter
tap. The design uses that fact. The FIR structures get their tap delays from
the registers inside the units. They need at most one extra register, or a few
balancing registers in the tree form.

A recursive (IIR) filter cannot absorb unit latency this way. Its feedback
result must be ready before the next sample. Here the feedback units run three
times faster than the forward path, so the feedback multiply-add finishes
within one sample period. Only the feedback units get the fast rate.

The top level, `fp_dsp_top`, places side by side:

* three FIR realisations of the same filter: Direct form, Transposed form and
  Direct form with an adder tree;
* three IIR realisations of the same cascade of second-order sections: Direct
  form I, Direct form II and Transposed Direct form II;
* the generic multiplier-accumulator (MAC) used to characterise the units.

## Arithmetic units

`fp_add` and `fp_mul` are IEEE 754 binary32 units. Each is combinational logic
followed by one output register that loads when `en` is high. The result
appears one enabled clock after the operands. A new operation can start on
every enabled clock.

* **Rounding:** every add and every multiply rounds to nearest, ties to even.
  Rounding is applied to the packed exponent/fraction word, so a carry out of
  the fraction moves the exponent. An overflow becomes infinity.
* **Subnormals:** handled in full as inputs and outputs. There is no flush to
  zero.
* **NaN:** every NaN result is the quiet NaN `7FC00000`. Invalid operations,
  inf - inf and 0 * inf, also give this NaN.
* **Signed zero:** an exact zero sum is +0, unless both operands are -0.
* **Reset:** the asynchronous active-low reset `rst_n` clears every register in
  the design to +0.
* **Datapath:** each unit has a plain single datapath.
  * The adder orders the operands by magnitude, then aligns them with guard,
    round and sticky bits. It adds or subtracts 28 bits, normalises by a
    leading-zero count and rounds.
  * The multiplier forms the 48-bit product, then normalises it. It shifts the
    result into the subnormal range when the exponent underflows, and rounds.

`fp_pkg` holds the shared pieces:

* the `fp32_t` type;
* the +0, infinity and NaN constants;
* the classification helpers;
* the `sos_coef_t` struct `{b0, b1, b2, a1, a2}`;
* the `sos_struct_e` enum that selects an IIR structure.

## FIR structures

All three FIR modules have the same ports. They take one sample `x` per clock
with `en` high, and coefficients `coef[k] = b_k` for k = 0..ORDER. The default
is `ORDER = 64`. Lower orders such as 8, 16 and 32 run on the same hardware
with the upper coefficients set to zero. The output is exactly the same.

**Direct form (`fir_direct`).**
* The sample is broadcast to all ORDER+1 multipliers.
* The products are summed by a chain of adders that runs from the b_N end
  towards y.
* Each adder is an output register, so each link of the chain delays its
  partial sum by one clock. That delay is what gives the taps their spacing.
* One explicit register sits on the input in front of the b_N multiplier. It
  aligns the last two products.
* Each multiplier-plus-adder pair is one `fp_fmac` cell.

**Transposed form (`fir_transposed`).**
* This is the same chain, but the one explicit register sits behind the b_N
  multiplier instead of in front of it.

Both forms compute y(n) = Σ b_k x(n-1-k). The output lags the input by two
register stages. The lag is the same for every order. The rounding order is
y = b0 x + (b1 x' + (… + (b_{N-1} x + b_N x'))). The innermost sum is formed
first.

**Direct form with adder tree (`fir_direct_tree`).**
* An input delay line of ORDER registers feeds one multiplier per tap.
* A tree of pipelined adders sums the ORDER+1 products. At each level, partial
  sums 2i and 2i+1 are added.
* When a level has an odd count, the highest-index partial sum passes through a
  plain register. The operands meeting at the next adder therefore arrive
  equally delayed.
* Latency is 1 + ceil(log2(ORDER+1)) stages. For power-of-two orders this is
  2 + log2(ORDER), which is 8 stages at order 64.
* The tree trades those extra registers for a short critical path and a rounding
  order close to pairwise summation.

## IIR sections and the two-rate clocking

Each IIR section is second order:

    H(z) = (b0 + b1 z^-1 + b2 z^-2) / (1 - a1 z^-1 - a2 z^-2)

The feedback coefficients are **added**. Negate a1 and a2 if your filter
design tool uses the `1 + a1 z^-1 + a2 z^-2` convention. `iir_cascade` chains
SECTIONS of them. The default is 4 sections, which is an order-8 filter. The
`STRUCTURE` parameter selects the section type.

**Clocking.**
* The design has one clock, `clk`, which is the fast feedback clock.
* The forward path advances only on clocks where `fd_en` is high.
* `fd_strobe_gen` makes `fd_en` high one clock in RATIO = 3. Its first pulse
  comes RATIO-1 clocks after reset.
* A register enabled this way acts like a register on a clock three times
  slower whose edges line up with every third fast edge.
* The input `x` must be held from one `fd_en` clock to the next. `y` changes
  only on `fd_en` clocks.

**Which units run on which clock.**

| Section | Runs on every clock | Runs on `fd_en` | Latency |
|---|---|---|---|
| `iir_sos_df1` (Direct form I) | a1 multiplier, feedback adder | a2 multiplier, b0/b1/b2 multipliers, the register in front of b2, the forward adders, the output adder | 3 forward stages |
| `iir_sos_df2` (Direct form II) | a1 and a2 multipliers, feedback adder | input adder, the state register feeding a2 and b2, the b-side multipliers and adders | 3 forward stages |
| `iir_sos_tdf2` (Transposed Direct form II) | a1 and a2 multipliers, the adder that adds a2·y, the adder that adds a1·y | b multipliers, the register behind b2, the adder that adds b1·x, the output adder | 2 forward stages |

**How the timing closes.**
* The output register takes y(n) on an `fd_en` clock.
* On the next fast clock, a1·y(n) is ready.
* On the fast clock after that, the feedback sum is ready.
* The next `fd_en` clock then takes that sum.
* The shortest loop therefore holds three registers: the output register, the
  a1 multiplier and the feedback adder. A ratio of 3 is exactly enough.
* With a ratio below 3 the loop does not close. The feedback would then
  arrive one sample late.

**Rounding orders.**
* DF1: y = (b0 x + (b1 x' + b2 x'')) + (a1 y' + a2 y'').
* TDF2: y = b0 x + (a1 y' + (b1 x' + (b2 x'' + a2 y''))).
* DF2 rounds the recursive state w = x + (a1 w' + a2 w'') first, then forms
  the b-side sum of w.

## Multiplier-accumulator and F-MAC cell

* `fp_mac` is a pipelined multiplier feeding a pipelined adder whose output
  returns to its own second input: `acc += in1 * in2`.
  * Because the product is registered, each operand pair reaches the
    accumulator one enabled clock after it is presented.
  * `acc` is cleared by reset only.
* `fp_fmac` computes `sum_out = w * s + sum_in`. Both units are registered, so
  the latency is two clocks.
  * The partial sum comes from a neighbouring unit, not from the cell's own
    output.
  * It is the tap cell of the Direct and Transposed FIR forms.

## Top level (`fp_dsp_top`)

* **Parameters:** `FIR_ORDER = 64`, `IIR_SECTIONS = 4`.
* **FIR:** the three FIR filters share `fir_x`, `fir_coef` and `fir_en`.
* **IIR:** the three IIR cascades share `iir_x` and `iir_coef`. The top
  generates their forward strobe and brings it out as `iir_fd_en`. The source
  should present a new IIR sample after each `iir_fd_en` clock.
* **MAC:** it has its own `mac_en`, `mac_in1` and `mac_in2` ports and the
  output `mac_acc`.
* **Coefficients:** these are ports in every module. Hold them constant while
  filtering. There is no coefficient memory or load interface.

## Simulating

Everything is plain SystemVerilog, checked with Verilator 5. Each testbench is
self-checking and ends with a line of the form
`TB_RESULT checks=<n> failures=<n>`. The testbenches compute their expected
values independently in double precision. Products and sums of two single
precision numbers are formed exactly or rounded once, then rounded back to
single precision. The expected values must match the RTL bit for bit.

Build and run one testbench from the directory above `rtl/` and `tb/`:

    verilator --binary --timing -Wno-fatal --top-module tb_fp_dsp_top \
        rtl/fp_pkg.sv tb/fp_ref_pkg.sv tb/dsp_stim_pkg.sv tb/tb_fp_dsp_top.sv \
        -y rtl -y tb -o sim
    ./obj_dir/sim

Replace `tb_fp_dsp_top` with any other `tb_*` module.

| Testbench | What it covers |
|---|---|
| `tb_fp_add`, `tb_fp_mul` | 80,000 to 100,000 operations each. Random operands from all classes: normal, subnormal, zero, infinity and NaN, including exponent-boundary, overflow and tie cases. Also checks the one-cycle latency and that nothing changes while `en` is low. |
| `tb_fir_*` | Order 16. Low pass, high pass, band pass and band stop coefficient sets, made with a Hamming-windowed sinc design. A sine-plus-noise input, random pauses of `en`, and the latency. |
| `tb_iir_sos_*`, `tb_iir_cascade` | Each section type on its own, then 4-section cascades of all three types. The latency in forward samples is checked. |
| `tb_fir_orders` | Orders 8, 16, 32 and 64, each with the four filter functions, run on the default order-64 filters with zeroed upper coefficients. Results are compared with a true order-N reference. |
| `tb_iir_band8` | The band-pass size: 8-section cascades of all three types, four low-pass sections followed by four high-pass sections. |
| `tb_fp_mac`, `tb_fp_fmac`, `tb_fd_strobe_gen` | The MAC with streaming and with rotating weights. The F-MAC cell. The strobe at RATIO 3 and 5. |
| `tb_fp_dsp_top` | The whole top at its default size (order-64 FIR, 4-section IIR) with no parameter overrides. It counts each mechanism and fails if one never occurred: FIR input pauses, IIR forward strobes, fast clocks without a strobe, MAC subnormal results and MAC overflow to infinity. It takes about 20 seconds in Verilator. |

## Where this RTL departs from the source design, and what is not here

* **Two clocks became one clock with an enable.** The original scheme has a
  forward clock and a feedback clock three times faster. Here the forward
  clock is an enable on the fast clock. This is equivalent when the two clocks
  have aligned edges, an alignment the source does not state. A true two-clock
  version would put the forward registers on a divided clock.
* **Plain single-datapath units only.** The original work also evaluates
  floating-point units with multiple data paths, which speed up common cases.
  Their internal design is not given, so they are not included. Any adder or
  multiplier with the same ports and one cycle of latency can be used instead.
* **Unspecified details are this design's own choice.** These are the IEEE
  corner cases above (rounding mode, subnormals, NaN encoding, reset value)
  and the clock enables.
* **The tree pairing is defined here.** The original tree drawing covers an
  even tap count. For ORDER+1 products the pairing and the position of the
  balancing registers are this design's own choice.
* **Some register clocks are assumed.** The register in front of b2 in Direct
  form I and the state register in Direct form II are assumed to be on the
  forward clock. The two unlabelled adders of the transposed section are also
  assumed to be on the forward clock. With these choices the loops close
  exactly.
* **Band-pass and band-stop IIR filters need more sections.** At order 8 they
  have twice the coefficients of low pass and high pass, which is 8 sections.
  Build the cascade with `IIR_SECTIONS = 8` for them. The default of 4 covers
  order-8 low pass and high pass.
* **Lower FIR orders keep the order-64 tree latency.** The Direct Tree at the
  default size always has 8 stages of latency, even with zeroed upper
  coefficients. Set `FIR_ORDER` to get the shorter latency of a smaller tree.
* **Test data is generated.** The evaluation used recorded audio clips and
  elliptic IIR designs. The testbenches use generated sine-plus-noise signals,
  windowed-sinc FIR coefficients and hand-placed stable IIR poles. The
  arithmetic checks do not depend on the data.
* **Not included:** power and switching-activity measurement, area and timing
  figures, and the non-pipelined reference structures that the pipelined ones
  were compared against.
