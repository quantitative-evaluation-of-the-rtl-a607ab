// iir_sos_tdf2: IIR second-order section, Transposed Direct form II, built
// from pipelined floating-point units with a fast feedback clock.
//
// The input sample feeds the b0, b1 and b2 multipliers (forward strobe
// fd_en). The b2 product passes one sample register and meets the a2 * y
// product in a fast-clock adder; a forward-strobe adder adds the b1 product;
// a fast-clock adder adds a1 * y; the forward-strobe output adder finally adds
// the b0 product and produces y. The a1 and a2 multipliers run on the fast
// clock. Every loop through y therefore holds one forward register and two
// fast registers (a1 path) or two forward and four fast registers (a2 path),
// so a1 y arrives one sample and a2 y two samples after y was produced.
//
// Function: y(n) = b0 x(n) + b1 x(n-1) + b2 x(n-2) + a1 y(n-1) + a2 y(n-2). Rounding order:
// y = b0 x + (a1 y' + (b1 x' + (b2 x'' + a2 y''))).
//
// Following the source design: the unit arrangement of the section, which
// adders and multipliers sit on the fast clock, the sample register behind the
// b2 multiplier, the 3:1 ratio.
// Own choices: fast clock plus forward enable instead of two clocks; the two
// adders the drawing leaves unmarked run on the forward strobe; reset clears
// all registers to +0.
//
// Interface: x is sampled on clk edges where fd_en is high and must be held
// between them; y changes only on those edges. Latency: two register stages,
// a sample taken at forward edge k reaches y after forward edge k+1.
module iir_sos_tdf2
  import fp_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      fd_en,
  input  fp32_t     x,
  input  sos_coef_t coef,
  output fp32_t     y
);

  fp32_t p_b0, p_b1, p_b2, p_b2_d;
  fp32_t p_a1, p_a2;
  fp32_t s2, s_mid, s1;

  fp_mul u_b0 (.clk, .rst_n, .en(fd_en), .a(coef.b0), .b(x), .y(p_b0));
  fp_mul u_b1 (.clk, .rst_n, .en(fd_en), .a(coef.b1), .b(x), .y(p_b1));
  fp_mul u_b2 (.clk, .rst_n, .en(fd_en), .a(coef.b2), .b(x), .y(p_b2));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     p_b2_d <= FP_ZERO;
    else if (fd_en) p_b2_d <= p_b2;
  end

  fp_mul u_a1 (.clk, .rst_n, .en(1'b1), .a(coef.a1), .b(y), .y(p_a1));
  fp_mul u_a2 (.clk, .rst_n, .en(1'b1), .a(coef.a2), .b(y), .y(p_a2));

  fp_add u_s2   (.clk, .rst_n, .en(1'b1),  .a(p_b2_d), .b(p_a2),  .y(s2));
  fp_add u_smid (.clk, .rst_n, .en(fd_en), .a(p_b1),   .b(s2),    .y(s_mid));
  fp_add u_s1   (.clk, .rst_n, .en(1'b1),  .a(p_a1),   .b(s_mid), .y(s1));
  fp_add u_out  (.clk, .rst_n, .en(fd_en), .a(p_b0),   .b(s1),    .y(y));

endmodule
