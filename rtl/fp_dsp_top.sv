// fp_dsp_top: floating-point FIR and IIR filter structures built from
// pipelined IEEE 754 single-precision adders and multipliers.
//
// Three FIR realisations of the same order-FIR_ORDER filter run side by side
// on one input stream and one coefficient set: Direct form, Transposed form
// and Direct form with an adder tree. Each uses the registers inside the
// pipelined units as its tap delays, with at most a few explicit registers.
// Three IIR realisations of the same cascade of IIR_SECTIONS second-order
// sections run side by side as well: Direct form I, Direct form II and
// Transposed Direct form II. Their feedback units run on every clock while
// their forward path advances on the strobe iir_fd_en, one clock in three,
// generated here. Next to them stands the general purpose multiplier-
// accumulator used to characterise the arithmetic units.
//
// Following the source design: the set of structures, their construction from
// pipelined units, order-64 FIR (the largest order evaluated) and order-8 IIR
// (four second-order sections, as in the evaluated elliptic filters), and the
// 3:1 ratio of the IIR feedback and forward clocks.
// Own choices: one clock for everything, the slow IIR clock being an enable;
// coefficients are input ports; FIR and IIR have separate inputs.
//
// Interface and timing:
//   fir_en       advances all three FIR filters one sample (normally held high)
//   fir_x        FIR input sample, fir_coef[k] = b_k
//   fir_y_*      outputs; Direct and Transposed after 2 register stages,
//                Direct Tree after 1 + ceil(log2(FIR_ORDER+1)) stages
//   iir_x        IIR input, sampled on clocks where iir_fd_en is high and to be
//                held between them; iir_coef[i] = section i coefficients
//   iir_y_*      outputs, updated on iir_fd_en clocks; 3 stages per section for
//                DF1 and DF2, 2 for TDF2
//   mac_*        multiplier-accumulator: mac_acc += mac_in1 * mac_in2
module fp_dsp_top
  import fp_pkg::*;
#(
  parameter int unsigned FIR_ORDER    = 64,
  parameter int unsigned IIR_SECTIONS = 4
) (
  input  logic                          clk,
  input  logic                          rst_n,

  input  logic                          fir_en,
  input  fp32_t                         fir_x,
  input  fp32_t [FIR_ORDER:0]           fir_coef,
  output fp32_t                         fir_y_direct,
  output fp32_t                         fir_y_transposed,
  output fp32_t                         fir_y_tree,

  input  fp32_t                         iir_x,
  input  sos_coef_t [IIR_SECTIONS-1:0]  iir_coef,
  output logic                          iir_fd_en,
  output fp32_t                         iir_y_df1,
  output fp32_t                         iir_y_df2,
  output fp32_t                         iir_y_tdf2,

  input  logic                          mac_en,
  input  fp32_t                         mac_in1,
  input  fp32_t                         mac_in2,
  output fp32_t                         mac_acc
);

  // FIR structures.
  fir_direct #(.ORDER(FIR_ORDER)) u_fir_direct (
    .clk, .rst_n, .en(fir_en), .x(fir_x), .coef(fir_coef), .y(fir_y_direct));

  fir_transposed #(.ORDER(FIR_ORDER)) u_fir_transposed (
    .clk, .rst_n, .en(fir_en), .x(fir_x), .coef(fir_coef), .y(fir_y_transposed));

  fir_direct_tree #(.ORDER(FIR_ORDER)) u_fir_tree (
    .clk, .rst_n, .en(fir_en), .x(fir_x), .coef(fir_coef), .y(fir_y_tree));

  // IIR structures with the shared forward strobe.
  fd_strobe_gen #(.RATIO(3)) u_fd (.clk, .rst_n, .fd_en(iir_fd_en));

  iir_cascade #(.STRUCTURE(SOS_DF1), .SECTIONS(IIR_SECTIONS)) u_iir_df1 (
    .clk, .rst_n, .fd_en(iir_fd_en), .x(iir_x), .coef(iir_coef), .y(iir_y_df1));

  iir_cascade #(.STRUCTURE(SOS_DF2), .SECTIONS(IIR_SECTIONS)) u_iir_df2 (
    .clk, .rst_n, .fd_en(iir_fd_en), .x(iir_x), .coef(iir_coef), .y(iir_y_df2));

  iir_cascade #(.STRUCTURE(SOS_TDF2), .SECTIONS(IIR_SECTIONS)) u_iir_tdf2 (
    .clk, .rst_n, .fd_en(iir_fd_en), .x(iir_x), .coef(iir_coef), .y(iir_y_tdf2));

  // Multiplier-accumulator.
  fp_mac u_mac (.clk, .rst_n, .en(mac_en), .in1(mac_in1), .in2(mac_in2), .acc(mac_acc));

endmodule
