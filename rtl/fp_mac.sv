// fp_mac: general purpose floating-point multiplier-accumulator.
//
// A pipelined multiplier forms in1 * in2 and a pipelined adder adds that
// product to its own registered output, which is fed back as the second adder
// operand. The adder register therefore is the accumulator: after every
// enabled edge acc = acc + (product registered on the previous edge).
//
// Following the source design: the multiplier-to-adder connection and the
// feedback of the adder output onto its own input, with no register outside
// the two pipelined units.
// Own choices: there is no clear input; reset sets the accumulator (and the
// product register) to +0. en advances both units together.
//
// Interface: in1, in2 operands; acc accumulated sum. Timing: an operand pair
// presented before edge k is in acc after edge k+1 (latency 2), one pair per
// enabled cycle.
module fp_mac
  import fp_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  en,
  input  fp32_t in1,
  input  fp32_t in2,
  output fp32_t acc
);

  fp32_t prod;

  fp_mul u_mul (.clk, .rst_n, .en, .a(in1), .b(in2), .y(prod));
  fp_add u_add (.clk, .rst_n, .en, .a(prod), .b(acc), .y(acc));

endmodule
