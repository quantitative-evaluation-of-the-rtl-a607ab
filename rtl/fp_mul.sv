// fp_mul: pipelined IEEE 754 single-precision multiplier, one register stage.
//
// The product a * b is formed combinationally and captured in an output
// register on a clock edge where en is high, so the result appears one enabled
// edge after the operands (a combinational multiplier followed by a delay
// element).
//
// How it works: the 24-bit significands (hidden bit included, none for a
// subnormal) are multiplied into a 48-bit product, which is normalised by its
// leading-zero count so that subnormal operands are covered too. The result
// exponent is ea + eb - 127 + 1 - lz. If it falls below 1 the significand is
// shifted right into the subnormal range with a sticky bit. The packed
// {exponent, fraction} word is then rounded to nearest, ties to even, so a
// rounding carry moves the exponent and may land on infinity.
//
// Following the source design: IEEE 754 single precision, rounding after every
// operation, one pipeline register at the unit output.
// Own choices: full subnormal support; every NaN result (NaN operand or
// inf * 0) is the canonical quiet NaN 7FC00000; the register resets to +0; the
// en input lets the same unit run at a reduced update rate.
//
// Interface: a, b operands; y registered product. Timing: latency 1 enabled
// cycle, one new operation per enabled cycle.
module fp_mul
  import fp_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  en,
  input  fp32_t a,
  input  fp32_t b,
  output fp32_t y
);

  fp32_t prod_c;

  always_comb begin
    logic               rsign;
    logic [23:0]        ma, mb;
    logic [47:0]        p, pn;
    logic [46:0]        pd;
    logic [5:0]         lz;
    logic signed [11:0] e;
    logic [11:0]        rsh;
    logic               sticky, inc;
    logic [7:0]         exp_field;
    logic [30:0]        packed_r;

    rsign = a[31] ^ b[31];
    ma    = {(a[30:23] != 8'd0), a[22:0]};
    mb    = {(b[30:23] != 8'd0), b[22:0]};
    p     = ma * mb;

    lz = 6'd48;
    for (int i = 0; i <= 47; i++)
      if (p[i]) lz = 6'(47 - i);
    pn = p << lz;

    // Biased exponent for a significand whose leading one is at bit 47.
    e = 12'(signed'({4'd0, (a[30:23] == 8'd0) ? 8'd1 : a[30:23]}))
      + 12'(signed'({4'd0, (b[30:23] == 8'd0) ? 8'd1 : b[30:23]}))
      - 12'sd126 - 12'(signed'({6'd0, lz}));

    if (e >= 12'sd1) begin
      rsh       = 12'd0;
      pd        = pn[46:0];
      sticky    = 1'b0;
      exp_field = e[7:0];
    end else begin
      rsh       = 12'(12'sd1 - e);
      pd        = (rsh >= 12'd48) ? 47'd0 : 47'(pn >> rsh);
      sticky    = (rsh >= 12'd48) ? (pn != 48'd0)
                                  : ((pn & ((48'd1 << rsh) - 48'd1)) != 48'd0);
      exp_field = 8'd0;
    end

    inc      = pd[23] & ((pd[22:0] != 23'd0) | sticky | pd[24]);
    packed_r = {exp_field, pd[46:24]} + {30'd0, inc};

    if (fp_is_nan(a[30:0]) || fp_is_nan(b[30:0]) ||
        (fp_is_inf(a[30:0]) && fp_is_zero(b[30:0])) ||
        (fp_is_zero(a[30:0]) && fp_is_inf(b[30:0]))) begin
      prod_c = FP_QNAN;
    end else if (fp_is_inf(a[30:0]) || fp_is_inf(b[30:0])) begin
      prod_c = {rsign, FP_INF[30:0]};
    end else if (p == 48'd0) begin
      prod_c = {rsign, 31'd0};
    end else if (e >= 12'sd255) begin
      prod_c = {rsign, FP_INF[30:0]};
    end else begin
      prod_c = {rsign, packed_r};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  y <= FP_ZERO;
    else if (en) y <= prod_c;
  end

endmodule
