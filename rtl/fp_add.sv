// fp_add: pipelined IEEE 754 single-precision adder, one register stage.
//
// The sum a + b is formed combinationally and captured in an output register
// on a clock edge where en is high, so the result appears one enabled edge
// after the operands: the unit behaves as a combinational adder followed by a
// delay element, which is how the filter structures built from it are timed.
//
// How it works: the operand of larger magnitude is taken as the reference, the
// other significand is aligned to it by a right shift that keeps guard, round
// and sticky bits, the significands are added or subtracted, the result is
// normalised (a one-place right shift on carry out, otherwise a left shift by
// the leading-zero count, limited so that the exponent stays at or above the
// subnormal exponent) and rounded to nearest, ties to even. Rounding is applied
// to the packed {exponent, fraction} word so that a carry out of the fraction
// moves the exponent and an exponent overflow lands on infinity.
//
// Following the source design: IEEE 754 single precision, rounding after every
// operation, one pipeline register at the unit output.
// Own choices: subnormal operands and results are handled in full; every NaN
// result is the canonical quiet NaN 7FC00000; inf + (-inf) gives that NaN;
// an exact zero sum is +0 unless both operands are -0; the register resets to
// +0; the en input lets the same unit run at a reduced update rate.
//
// Interface: a, b operands; y registered sum. Timing: latency 1 enabled cycle,
// one new operation per enabled cycle.
module fp_add
  import fp_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  en,
  input  fp32_t a,
  input  fp32_t b,
  output fp32_t y
);

  fp32_t sum_c;

  always_comb begin
    logic        sa, sb, sl, ss, sub, rsign;
    logic [7:0]  ea, eb, el, es;
    logic [23:0] ma, mb, ml, ms;
    logic [8:0]  d;
    logic [26:0] ml_x, ms_x;
    logic [27:0] s;
    logic [26:0] norm;
    logic [8:0]  exp_n;
    logic [4:0]  lz;
    logic [8:0]  shamt;
    logic        inc;
    logic [30:0] packed_r;

    sa = a[31];
    sb = b[31];
    // Effective exponent of a subnormal is 1, with no hidden bit.
    ea = (a[30:23] == 8'd0) ? 8'd1 : a[30:23];
    eb = (b[30:23] == 8'd0) ? 8'd1 : b[30:23];
    ma = {(a[30:23] != 8'd0), a[22:0]};
    mb = {(b[30:23] != 8'd0), b[22:0]};

    // Order the operands by magnitude.
    if (a[30:0] >= b[30:0]) begin
      sl = sa; el = ea; ml = ma;
      ss = sb; es = eb; ms = mb;
    end else begin
      sl = sb; el = eb; ml = mb;
      ss = sa; es = ea; ms = ma;
    end
    sub = sl ^ ss;
    d   = {1'b0, el} - {1'b0, es};

    // Alignment with guard, round and sticky bits.
    ml_x = {ml, 3'b000};
    if (d >= 9'd27) begin
      ms_x = {26'd0, (ms != 24'd0)};
    end else begin
      ms_x    = {ms, 3'b000} >> d;
      ms_x[0] = ms_x[0] | (({ms, 3'b000} & ((27'd1 << d) - 27'd1)) != 27'd0);
    end

    s = sub ? ({1'b0, ml_x} - {1'b0, ms_x}) : ({1'b0, ml_x} + {1'b0, ms_x});

    // Normalisation.
    lz = 5'd27;
    for (int i = 0; i <= 26; i++)
      if (s[i]) lz = 5'(26 - i);
    shamt = ({4'd0, lz} < ({1'b0, el} - 9'd1)) ? {4'd0, lz} : ({1'b0, el} - 9'd1);
    if (s[27]) begin
      norm  = {s[27:2], s[1] | s[0]};
      exp_n = {1'b0, el} + 9'd1;
    end else begin
      norm  = s[26:0] << shamt;
      exp_n = {1'b0, el} - shamt;
    end

    // Round to nearest, ties to even, on the packed word.
    inc      = norm[2] & (norm[1] | norm[0] | norm[3]);
    packed_r = {(norm[26] ? exp_n[7:0] : 8'd0), norm[25:3]} + {30'd0, inc};
    rsign    = sl;

    if (fp_is_nan(a[30:0]) || fp_is_nan(b[30:0]) || (fp_is_inf(a[30:0]) && fp_is_inf(b[30:0]) && (sa != sb))) begin
      sum_c = FP_QNAN;
    end else if (fp_is_inf(a[30:0])) begin
      sum_c = a;
    end else if (fp_is_inf(b[30:0])) begin
      sum_c = b;
    end else if (s == 28'd0) begin
      sum_c = {sa & sb, 31'd0};
    end else if (exp_n >= 9'd255) begin
      sum_c = {rsign, FP_INF[30:0]};
    end else begin
      sum_c = {rsign, packed_r};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  y <= FP_ZERO;
    else if (en) y <= sum_c;
  end

endmodule
