// tb_fp_fmac: self-checking testbench for the transversal-filter
// multiplier-accumulator cell fp_fmac.
//
// As in a filter tap, the partial-sum input comes from a second multiplier
// (weight W2 times the same sample S), modelled here in the testbench. Two
// environments are run: constant weights and weights rotating through the
// nine coefficients of an order-8 low pass FIR filter. After every clock the
// output is compared with a cycle model built from the reference arithmetic:
// product register, then sum_out = product + sum_in, so the weight and sample
// take two clocks and the partial sum one clock to reach the output.
`timescale 1ns/1ps
module tb_fp_fmac;
  import fp_pkg::*;
  import fp_ref_pkg::*;
  import dsp_stim_pkg::*;

  logic  clk = 1'b0;
  logic  rst_n = 1'b0;
  logic  en = 1'b1;
  fp32_t w = '0, s = '0, sum_in = '0;
  fp32_t sum_out;
  int    checks = 0, failures = 0;

  fp_fmac dut (.clk, .rst_n, .en, .w, .s, .sum_in, .sum_out);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    fp32_t m_prod, m_out, w2;
    for (int envn = 0; envn < 2; envn++) begin
      rst_n = 1'b0;
      repeat (2) @(posedge clk);
      #1 rst_n = 1'b1;
      m_prod = FP_ZERO;
      m_out  = FP_ZERO;
      sum_in = FP_ZERO;
      for (int n = 0; n < 3000; n++) begin
        en = ($urandom % 7) != 0;
        w  = (envn == 0) ? fir_coef(8, 0, 4) : fir_coef(8, 0, n % 9);
        w2 = (envn == 0) ? fir_coef(8, 0, 3) : fir_coef(8, 0, (n + 1) % 9);
        s  = sig_sample(n);
        @(posedge clk);
        if (en) begin
          m_out  = ref_add(m_prod, sum_in);
          m_prod = ref_mul(w, s);
        end
        #1;
        checks++;
        if (sum_out !== m_out) begin
          failures++;
          if (failures < 10) $display("env %0d step %0d: out=%h expected %h", envn, n, sum_out, m_out);
        end
        // Second multiplier of the tap: its registered product feeds sum_in.
        if (en) sum_in = ref_mul(w2, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
