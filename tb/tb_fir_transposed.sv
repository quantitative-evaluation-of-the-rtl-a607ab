// tb_fir_transposed: self-checking testbench for fir_transposed.
//
// Runs the filter at order 16 with the coefficient sets of the four filter
// functions in turn (low pass, high pass, band pass, band stop), fed with a
// synthetic audio-like signal, and with random stalls of the sample enable.
// After every clock the output is compared bit for bit with a reference that
// evaluates the filter sum directly from the input history in
// single-precision arithmetic, in the same association order as the
// structures (products summed from tap N towards tap 0). Because the
// reference reads the sample history at a fixed
// offset, the comparison also checks the latency (two register stages). During
// stalls the output must hold.
`timescale 1ns/1ps
module tb_fir_transposed;
  import fp_pkg::*;
  import fp_ref_pkg::*;
  import dsp_stim_pkg::*;

  localparam int unsigned ORDER = 16;
  localparam int unsigned NSAMP = 600;

  logic            clk = 1'b0;
  logic            rst_n = 1'b0;
  logic            en = 1'b0;
  fp32_t           x = 32'h3F80_0000;
  fp32_t [ORDER:0] coef;
  fp32_t           y;
  int              checks = 0, failures = 0, stalls = 0;


  fir_transposed #(.ORDER(ORDER)) dut (.clk, .rst_n, .en, .x, .coef, .y);

  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  fp32_t xh [int];   // xh[j]: sample taken at enabled edge j

  localparam int LAT = 0;   // y after edge j uses samples up to edge j-1

  // y after enabled edge j: sum_k b_k x(j-1-k), accumulated from tap N down.
  function automatic fp32_t ref_y(int j);
    fp32_t acc;
    acc = ref_mul(coef[ORDER], xh[j - 1 - int'(ORDER)]);
    for (int k = int'(ORDER) - 1; k >= 0; k--)
      acc = ref_add(ref_mul(coef[k], xh[j - 1 - k]), acc);
    return acc;
  endfunction

  initial begin
    int    j;
    fp32_t expv, held;
    for (int kind = 0; kind < 4; kind++) begin
      for (int k = 0; k <= int'(ORDER); k++) coef[k] = fir_coef(ORDER, kind, k);
      rst_n = 1'b0;
      en    = 1'b0;
      repeat (2) @(posedge clk);
      #1 rst_n = 1'b1;
      j = 0;
      xh.delete();
      x  = sig_sample(0);
      en = 1'b1;
      while (j < NSAMP) begin
        @(posedge clk);
        if (en) begin
          xh[j] = x;
          j++;
        end
        #1;
        if (en && (j - 2 - LAT - int'(ORDER)) >= 0) begin
          expv = ref_y(j - 1);
          checks++;
          if (y !== expv) begin
            failures++;
            if (failures < 10) $display("kind %0d edge %0d: y=%h expected %h", kind, j - 1, y, expv);
          end
        end
        if (!en) begin
          checks++;
          if (y !== held) failures++;
        end
        held = y;
        // Next sample, with an occasional stall.
        en = ($urandom % 8) != 0;
        if (!en) stalls++;
        x = sig_sample(j + 1000 * kind);
      end
    end
    if (stalls == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
