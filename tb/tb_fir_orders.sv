// tb_fir_orders: FIR workload testbench, orders 8, 16, 32 and 64 on the
// default order-64 hardware.
//
// Instantiates the Direct, Transposed and Direct Tree FIR structures at their
// default order of 64. For every filter order N in {8, 16, 32, 64} and every
// filter function (low pass, high pass, band pass, band stop) it loads the
// order-N coefficients b_0..b_N, sets the unused upper coefficients to +0,
// resets the filters and streams a synthetic audio-like signal through them.
// Each output is compared bit for bit with a single-precision reference of the
// order-N filter itself, not of the padded one:
//   Direct and Transposed: sum_k b_k x(n-1-k) accumulated from tap N down to
//   tap 0, two register stages of latency;
//   Direct Tree: the N+1 products summed pairwise level by level, with the
//   latency of the order-64 tree (1 + 7 register stages).
// This shows that a lower order runs on the larger filter with the same
// results, the zero taps adding exactly nothing.
`timescale 1ns/1ps
module tb_fir_orders;
  import fp_pkg::*;
  import fp_ref_pkg::*;
  import dsp_stim_pkg::*;

  localparam int unsigned HW_ORDER = 64;
  localparam int          LEVELS   = $clog2(HW_ORDER + 1);
  localparam int          NSAMP    = 220;

  logic               clk = 1'b0;
  logic               rst_n = 1'b0;
  logic               en = 1'b1;
  fp32_t              x = 32'h3F80_0000;
  fp32_t [HW_ORDER:0] coef;
  fp32_t              y [3];
  int                 checks = 0, failures = 0;

  fir_direct      u_direct (.clk, .rst_n, .en, .x, .coef, .y(y[0]));
  fir_transposed  u_transp (.clk, .rst_n, .en, .x, .coef, .y(y[1]));
  fir_direct_tree u_tree   (.clk, .rst_n, .en, .x, .coef, .y(y[2]));

  always #5 clk = ~clk;

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  fp32_t xh [int];   // xh[j]: sample taken at edge j

  // Chain forms, order n: y after edge j is sum_k b_k x(j-1-k), from tap n down.
  function automatic fp32_t ref_chain(int n, int j);
    fp32_t acc;
    acc = ref_mul(coef[n], xh[j - 1 - n]);
    for (int k = n - 1; k >= 0; k--)
      acc = ref_add(ref_mul(coef[k], xh[j - 1 - k]), acc);
    return acc;
  endfunction

  // Tree form, order n: products b_k x(j-LEVELS-k) summed pairwise.
  function automatic fp32_t ref_tree(int n, int j);
    fp32_t v [$];
    fp32_t nv [$];
    for (int k = 0; k <= n; k++) v.push_back(ref_mul(coef[k], xh[j - LEVELS - k]));
    while (v.size() > 1) begin
      nv = {};
      for (int i = 0; i < v.size(); i += 2)
        nv.push_back((i + 1 < v.size()) ? ref_add(v[i], v[i+1]) : v[i]);
      v = nv;
    end
    return v[0];
  endfunction

  initial begin
    int    n;
    fp32_t expv [3];
    for (int o = 0; o < 4; o++) begin
      n = 8 << o;
      for (int kind = 0; kind < 4; kind++) begin
        for (int k = 0; k <= int'(HW_ORDER); k++)
          coef[k] = (k <= n) ? fir_coef(n, kind, k) : FP_ZERO;
        rst_n = 1'b0;
        repeat (2) @(posedge clk);
        #1 rst_n = 1'b1;
        xh.delete();
        x = sig_sample(0);
        for (int j = 0; j < NSAMP; j++) begin
          @(posedge clk);
          xh[j] = x;
          #1;
          // Compare once the whole order-64 pipeline holds filter data.
          if (j - 1 - LEVELS - int'(HW_ORDER) >= 0) begin
            expv[0] = ref_chain(n, j);
            expv[1] = expv[0];
            expv[2] = ref_tree(n, j);
            for (int s = 0; s < 3; s++) begin
              checks++;
              if (y[s] !== expv[s]) begin
                failures++;
                if (failures < 10)
                  $display("order %0d kind %0d structure %0d edge %0d: y=%h expected %h",
                           n, kind, s, j, y[s], expv[s]);
              end
            end
          end
          x = sig_sample(j + 1 + 1000 * kind + 7 * n);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
