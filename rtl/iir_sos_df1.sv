// iir_sos_df1: IIR second-order section, Direct form I, built from pipelined
// floating-point units with a fast feedback clock.
//
// Forward part (all on the forward strobe fd_en): x feeds the b0 and b1
// multipliers directly and the b2 multiplier through one sample register; the
// b1 and b2 products are added, then the b0 product is added to that sum. The
// pipeline registers of the units give the taps their one-sample spacing, as
// in the pipelined FIR structures. Recursive part: the output adder (forward
// strobe) adds the forward sum to the feedback sum. The a2 multiplier runs on
// the forward strobe; the a1 multiplier and the feedback adder run on every
// fast clock. After the output register takes y(n), a1*y(n) is ready one fast
// clock later and a1*y(n) + a2*y(n-1) another fast clock later, in time for
// the next forward edge. This needs fd_en to be high one cycle in three
// (fd_strobe_gen).
//
// Function: y(n) = b0 x(n) + b1 x(n-1) + b2 x(n-2) + a1 y(n-1) + a2 y(n-2). Rounding order:
// y = (b0 x + (b1 x' + b2 x'')) + (a1 y' + a2 y'').
//
// Following the source design: the unit arrangement of the section, which
// multiplier and adder sit on the fast clock, and the 3:1 clock ratio.
// Own choices: the fast clock is clk and the slow clock is an enable; the
// sample register before b2 is on the forward strobe; reset clears all
// registers to +0; coefficient signs follow 1 - a1 z^-1 - a2 z^-2.
//
// Interface: x is sampled on clk edges where fd_en is high and must be held
// from one such edge to the next; y changes only on those edges. Latency:
// three register stages, a sample taken at forward edge k reaches y after
// forward edge k+2.
module iir_sos_df1
  import fp_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      fd_en,
  input  fp32_t     x,
  input  sos_coef_t coef,
  output fp32_t     y
);

  fp32_t x_d;
  fp32_t p_b0, p_b1, p_b2, s_b12, s_fwd;
  fp32_t p_a1, p_a2, s_fb;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     x_d <= FP_ZERO;
    else if (fd_en) x_d <= x;
  end

  // Forward (non-recursive) part.
  fp_mul u_b0  (.clk, .rst_n, .en(fd_en), .a(coef.b0), .b(x),   .y(p_b0));
  fp_mul u_b1  (.clk, .rst_n, .en(fd_en), .a(coef.b1), .b(x),   .y(p_b1));
  fp_mul u_b2  (.clk, .rst_n, .en(fd_en), .a(coef.b2), .b(x_d), .y(p_b2));
  fp_add u_s12 (.clk, .rst_n, .en(fd_en), .a(p_b1),    .b(p_b2),  .y(s_b12));
  fp_add u_sfw (.clk, .rst_n, .en(fd_en), .a(p_b0),    .b(s_b12), .y(s_fwd));

  // Recursive part.
  fp_add u_out (.clk, .rst_n, .en(fd_en), .a(s_fwd),   .b(s_fb),  .y(y));
  fp_mul u_a1  (.clk, .rst_n, .en(1'b1),  .a(coef.a1), .b(y),     .y(p_a1));
  fp_mul u_a2  (.clk, .rst_n, .en(fd_en), .a(coef.a2), .b(y),     .y(p_a2));
  fp_add u_sfb (.clk, .rst_n, .en(1'b1),  .a(p_a1),    .b(p_a2),  .y(s_fb));

endmodule
