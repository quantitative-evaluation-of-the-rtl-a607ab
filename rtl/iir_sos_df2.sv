// iir_sos_df2: IIR second-order section, Direct form II, built from pipelined
// floating-point units with a fast feedback clock.
//
// The input adder (forward strobe fd_en) forms the state w(n) = x(n) +
// feedback sum. w feeds the a1, b0 and b1 multipliers directly and, through
// one sample register, the a2 and b2 multipliers. The a1 and a2 multipliers
// and the feedback adder run on every fast clock: after w(n) is registered,
// the products are ready one fast clock later and their sum a1 w(n) +
// a2 w(n-1) another fast clock later, in time for the next forward edge.
// On the output side the b1 and b2 products are added and the b0 product is
// added to that sum, all on the forward strobe.
//
// Function: w(n) = x(n) + a1 w(n-1) + a2 w(n-2),
// y(n) = b0 w(n) + b1 w(n-1) + b2 w(n-2). Rounding order: w = x + (a1 w' + a2 w''); y = b0 w + (b1 w' + b2 w'').
//
// Following the source design: the unit arrangement of the section, which
// units sit on the fast clock, the shared state register, the 3:1 ratio.
// Own choices: fast clock plus forward enable instead of two clocks; the
// state register is on the forward strobe; reset clears all registers to +0.
//
// Interface: x is sampled on clk edges where fd_en is high and must be held
// between them; y changes only on those edges. Latency: three register
// stages, a sample taken at forward edge k reaches y after forward edge k+2.
module iir_sos_df2
  import fp_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      fd_en,
  input  fp32_t     x,
  input  sos_coef_t coef,
  output fp32_t     y
);

  fp32_t w, w_d;
  fp32_t p_a1, p_a2, s_fb;
  fp32_t p_b0, p_b1, p_b2, s_b12;

  // Recursive part.
  fp_add u_win (.clk, .rst_n, .en(fd_en), .a(x), .b(s_fb), .y(w));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     w_d <= FP_ZERO;
    else if (fd_en) w_d <= w;
  end

  fp_mul u_a1  (.clk, .rst_n, .en(1'b1), .a(coef.a1), .b(w),    .y(p_a1));
  fp_mul u_a2  (.clk, .rst_n, .en(1'b1), .a(coef.a2), .b(w_d),  .y(p_a2));
  fp_add u_sfb (.clk, .rst_n, .en(1'b1), .a(p_a1),    .b(p_a2), .y(s_fb));

  // Forward part.
  fp_mul u_b0  (.clk, .rst_n, .en(fd_en), .a(coef.b0), .b(w),     .y(p_b0));
  fp_mul u_b1  (.clk, .rst_n, .en(fd_en), .a(coef.b1), .b(w),     .y(p_b1));
  fp_mul u_b2  (.clk, .rst_n, .en(fd_en), .a(coef.b2), .b(w_d),   .y(p_b2));
  fp_add u_s12 (.clk, .rst_n, .en(fd_en), .a(p_b1),    .b(p_b2),  .y(s_b12));
  fp_add u_out (.clk, .rst_n, .en(fd_en), .a(p_b0),    .b(s_b12), .y(y));

endmodule
