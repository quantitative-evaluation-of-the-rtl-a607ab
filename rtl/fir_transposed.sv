// fir_transposed: order-N FIR filter, Transposed form built from pipelined
// floating-point units.
//
// The input sample is broadcast to every multiplier, b_0 .. b_N. The product
// of the last multiplier (b_N) goes through one explicit register, on the
// computed data path, before it joins the product of tap N-1; the partial sum
// then runs through a chain of tap cells (fp_fmac) from tap N-1 down to tap 0.
// Each pipelined adder in the chain delays the partial sum by one clock, so
// tap k sees the sample k clocks older than tap 0 does.
//
// y(n) = sum_{k=0..N} b_k x(n-1-k), with x(n) the sample taken at edge n and
// y(n) the output after edge n: two register stages (multiplier, adder). The sum is
// accumulated from tap N towards tap 0, so the rounding order is
// y = b_0 x + (b_1 x' + (... + (b_{N-1} x'' + b_N x''')...)).
//
// Following the source design: pipelined units whose output registers provide
// the tap delays, a single explicit delay element, latency of two clocks and
// the transposed placement of that delay element. Default order 64, the largest
// order the evaluation uses.
// Own choices: coefficients are an input port (held constant by the user), en
// advances the whole filter one sample, reset clears every register to +0.
//
// Interface: x sample, coef[k] = b_k, y filtered output; a new sample every
// enabled clock. Latency: two register stages, a sample taken at edge k
// reaches y after edge k+1. ORDER must be at least 2.
module fir_transposed
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

  fp32_t p_now;   // b_N * x
  fp32_t p_last;  // the one explicit delay, on the computed data path

  fp_mul u_mul_last (.clk, .rst_n, .en, .a(coef[ORDER]), .b(x), .y(p_now));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  p_last <= FP_ZERO;
    else if (en) p_last <= p_now;
  end

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
