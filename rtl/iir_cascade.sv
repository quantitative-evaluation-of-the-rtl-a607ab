// iir_cascade: IIR filter as a cascade of second-order sections.
//
// H(z) = prod_{i} (b0_i + b1_i z^-1 + b2_i z^-2) / (1 - a1_i z^-1 - a2_i z^-2):
// section i filters the output of section i-1, all sections sharing the fast
// clock and the forward strobe. STRUCTURE selects the realisation of every
// section (Direct form I, Direct form II or Transposed Direct form II).
//
// Following the source design: second-order-section cascade, order 8 (four
// sections) as in the evaluated elliptic filters, one realisation throughout.
// Own choices: no overall gain factor (it can be folded into the b
// coefficients of one section); coefficients are an input port.
//
// Interface: x is sampled on clk edges where fd_en is high; coef[i] holds the
// coefficients of section i (section 0 takes x). Latency in register stages
// (forward edges from the edge that samples x to the edge that updates y,
// plus one): SECTIONS * 3 for DF1 and DF2, SECTIONS * 2 for TDF2.
module iir_cascade
  import fp_pkg::*;
#(
  parameter sos_struct_e STRUCTURE = SOS_DF1,
  parameter int unsigned SECTIONS  = 4
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        fd_en,
  input  fp32_t                       x,
  input  sos_coef_t [SECTIONS-1:0]    coef,
  output fp32_t                       y
);

  fp32_t stage [SECTIONS+1];
  assign stage[0] = x;

  for (genvar i = 0; i < SECTIONS; i++) begin : g_sec
    if (STRUCTURE == SOS_DF1) begin : g_df1
      iir_sos_df1 u_sos (.clk, .rst_n, .fd_en, .x(stage[i]), .coef(coef[i]), .y(stage[i+1]));
    end else if (STRUCTURE == SOS_DF2) begin : g_df2
      iir_sos_df2 u_sos (.clk, .rst_n, .fd_en, .x(stage[i]), .coef(coef[i]), .y(stage[i+1]));
    end else begin : g_tdf2
      iir_sos_tdf2 u_sos (.clk, .rst_n, .fd_en, .x(stage[i]), .coef(coef[i]), .y(stage[i+1]));
    end
  end

  assign y = stage[SECTIONS];

endmodule
