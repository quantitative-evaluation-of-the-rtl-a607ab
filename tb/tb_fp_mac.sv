// tb_fp_mac: self-checking testbench for the multiplier-accumulator fp_mac.
//
// Two stimulus environments are run one after the other, each from reset:
// streaming, where both inputs take a new value every clock, and rotating,
// where in1 cycles through the nine coefficients of an order-8 low pass FIR
// filter while in2 streams. Sample enables are dropped at random. A cycle
// model built from the reference arithmetic (product register, then
// accumulator = accumulator + product) is compared with the output after every
// clock, which checks the two-stage latency and the feedback of the adder
// output onto its own input.
`timescale 1ns/1ps
module tb_fp_mac;
  import fp_pkg::*;
  import fp_ref_pkg::*;
  import dsp_stim_pkg::*;

  logic  clk = 1'b0;
  logic  rst_n = 1'b0;
  logic  en = 1'b0;
  fp32_t in1 = '0, in2 = '0;
  fp32_t acc;
  int    checks = 0, failures = 0;

  fp_mac dut (.clk, .rst_n, .en, .in1, .in2, .acc);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    fp32_t m_prod, m_acc;
    for (int envn = 0; envn < 2; envn++) begin
      rst_n = 1'b0;
      repeat (2) @(posedge clk);
      #1 rst_n = 1'b1;
      m_prod = FP_ZERO;
      m_acc  = FP_ZERO;
      for (int n = 0; n < 3000; n++) begin
        en  = ($urandom % 6) != 0;
        in1 = (envn == 0) ? sig_sample(n + 7777) : fir_coef(8, 0, n % 9);
        in2 = sig_sample(n);
        @(posedge clk);
        if (en) begin
          m_acc  = ref_add(m_prod, m_acc);
          m_prod = ref_mul(in1, in2);
        end
        #1;
        checks++;
        if (acc !== m_acc) begin
          failures++;
          if (failures < 10) $display("env %0d step %0d: acc=%h expected %h", envn, n, acc, m_acc);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
