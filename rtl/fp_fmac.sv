// fp_fmac: transversal-filter multiplier-accumulator (one FIR tap cell).
//
// A pipelined multiplier forms weight * sample and a pipelined adder adds the
// registered product to the partial sum arriving from the neighbouring tap.
// Because both units carry one register, each tap adds one clock of delay to
// the partial sum flowing through it, which is what gives the pipelined
// Direct and Transposed FIR structures their tap-to-tap delay without any
// explicit delay register.
//
// Following the source design: one multiplier and one adder per cell, with the
// second adder operand coming from outside the cell.
// Own choices: port names; en advances both units together; reset to +0.
//
// Interface: w weight, s sample, sum_in partial sum from the next tap, sum_out
// = w*s + sum_in. Timing: w and s presented before edge k reach sum_out after
// edge k+1; sum_in presented before edge k reaches it after edge k.
module fp_fmac
  import fp_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  en,
  input  fp32_t w,
  input  fp32_t s,
  input  fp32_t sum_in,
  output fp32_t sum_out
);

  fp32_t prod;

  fp_mul u_mul (.clk, .rst_n, .en, .a(w), .b(s), .y(prod));
  fp_add u_add (.clk, .rst_n, .en, .a(prod), .b(sum_in), .y(sum_out));

endmodule
