// fir_direct: order-N FIR filter, Direct form built from pipelined
// floating-point units.
//
// The input sample is broadcast to the multipliers of taps 0 .. N-1, and one
// explicit register delays the sample in front of the last multiplier (b_N).
// The last product is added to the product of tap N-1 and the partial sum then
// runs through a chain of tap cells (fp_fmac) from tap N-1 down to tap 0. Each
// pipelined adder in the chain delays the partial sum by one clock, so tap k
// sees the sample k clocks older than tap 0 does, which is the FIR delay line
// folded into the adders.
//
// y(n) = sum_{k=0..N} b_k x(n-1-k), with x(n) the sample taken at edge n and
// y(n) the output after edge n: two register stages (multiplier, adder). The sum is
// accumulated from tap N towards tap 0, so the rounding order is
// y = b_0 x + (b_1 x' + (... + (b_{N-1} x'' + b_N x''')...)).
//
// Following the source design: pipelined units whose output registers provide
// the tap delays, a single explicit delay element, latency of two clocks and
// the direct placement of that delay element. Default order 64, the largest
// order the evaluation uses.
// Own choices: coefficients are an input port (held constant by the user), en
// advances the whole filter one sample, reset clears every register to +0.
//
// Interface: x sample, coef[k] = b_k, y filtered output; a new sample every
// enabled clock. Latency: two register stages, a sample taken at edge k
// reaches y after edge k+1. ORDER must be at least 2.
module fir_direct
  import fp_pkg::*;
#(
  parameter int unsigned ORDER = 64
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              en,
  input  fp32_t             x,
  input  fp32_t [ORDER:0]   coef,
  output fp32_t             y
);

  fp32_t x_d;     // the one explicit delay, on the input data path
  fp32_t p_last;  // b_N * x_d

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  x_d <= FP_ZERO;
    else if (en) x_d <= x;
  end

  fp_mul u_mul_last (.clk, .rst_n, .en, .a(coef[ORDER]), .b(x_d), .y(p_last));

  // Partial sums: psum[k] is the output of tap k.
  fp32_t psum [ORDER];

  for (genvar k = 0; k < ORDER; k++) begin : g_tap
    fp32_t sum_in;
    if (k == ORDER - 1) begin : g_last
      assign sum_in = p_last;
    end else begin : g_mid
      assign sum_in = psum[k + 1];
    end
    fp_fmac u_tap (
      .clk, .rst_n, .en,
      .w      (coef[k]),
      .s      (x),
      .sum_in (sum_in),
      .sum_out(psum[k])
    );
  end

  assign y = psum[0];

endmodule
