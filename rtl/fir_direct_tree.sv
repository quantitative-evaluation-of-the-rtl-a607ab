// fir_direct_tree: order-N FIR filter, Direct form with an adder tree, built
// from pipelined floating-point units.
//
// The input sample runs down a delay line of N registers, so tap k sees
// x(n-k). Every tap has its own pipelined multiplier (b_k * x(n-k)), and the
// N+1 products are summed by a tree of pipelined adders instead of a chain.
// Each tree level halves the number of partial sums; when a level has an odd
// count, the last partial sum is carried to the next level through a plain
// register, so that all operands meeting at an adder have been delayed by the
// same number of clocks.
//
// Timing: latency = 1 (multiplier) + ceil(log2(N+1)) (adder levels) register
// stages, which is 2 + log2 N for the power-of-two orders 8, 16, 32 and 64; a
// sample taken at edge k first reaches y after edge k + latency - 1. A new
// sample is accepted every enabled clock.
//
// Rounding order: at level l, partial sum i is the sum of partial sums 2i and
// 2i+1 of level l-1 (products indexed from b_0), odd leftovers passing
// unchanged.
//
// Following the source design: input delay line, one pipelined multiplier per
// tap, a tree of pipelined adders, balancing registers where a branch is
// shorter, and the latency formula. Default order 64, the largest order the
// evaluation uses.
// Own choices: the exact pairing of products and the position of the balancing
// registers (the leftover of each odd level is the highest-index partial sum);
// coefficients are an input port; en advances the whole filter one sample;
// reset clears every register to +0.
//
// Interface: x sample, coef[k] = b_k, y filtered output. ORDER at least 1.
module fir_direct_tree
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

  localparam int unsigned TAPS    = ORDER + 1;
  localparam int unsigned LEVELS  = $clog2(TAPS);

  // Number of partial sums at tree level l (level 0 holds the products).
  function automatic int unsigned level_count(int unsigned l);
    return (TAPS + (1 << l) - 1) >> l;
  endfunction

  // Input delay line: x_dl[k] = x(n-k).
  fp32_t x_dl [TAPS];
  assign x_dl[0] = x;

  for (genvar k = 1; k < TAPS; k++) begin : g_dly
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)  x_dl[k] <= FP_ZERO;
      else if (en) x_dl[k] <= x_dl[k-1];
    end
  end

  // node[l][i]: partial sum i at tree level l.
  fp32_t node [LEVELS+1][TAPS];

  for (genvar k = 0; k < TAPS; k++) begin : g_mul
    fp_mul u_mul (.clk, .rst_n, .en, .a(coef[k]), .b(x_dl[k]), .y(node[0][k]));
  end

  for (genvar l = 0; l < LEVELS; l++) begin : g_lvl
    for (genvar i = 0; i < TAPS; i++) begin : g_node
      if (i >= level_count(l + 1)) begin : g_unused
        assign node[l+1][i] = FP_ZERO;
      end else if (2 * i + 1 < level_count(l)) begin : g_add
        fp_add u_add (.clk, .rst_n, .en,
                      .a(node[l][2*i]), .b(node[l][2*i+1]), .y(node[l+1][i]));
      end else begin : g_bal
        // Balancing register for the odd partial sum of this level.
        always_ff @(posedge clk or negedge rst_n) begin
          if (!rst_n)  node[l+1][i] <= FP_ZERO;
          else if (en) node[l+1][i] <= node[l][2*i];
        end
      end
    end
  end

  assign y = node[LEVELS][0];

endmodule
