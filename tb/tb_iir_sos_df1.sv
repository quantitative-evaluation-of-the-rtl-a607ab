// tb_iir_sos_df1: self-checking testbench for iir_sos_df1.
//
// The testbench drives the fast clock and a forward strobe that is high one
// clock in three, changes the input right after each forward edge and holds
// it in between. Two coefficient sets (a low pass like and a high pass like
// stable section) are run, each from reset, on a synthetic audio-like signal.
// After every forward edge the output is compared bit for bit with the
// section's difference equation evaluated in single-precision arithmetic in
// the section's own association order:
//   y(k) = (b0 x(k-2) + (b1 x(k-3) + b2 x(k-4))) + (a1 y(k-1) + a2 y(k-2))
// The reference indexes the input history at a fixed offset, so the latency
// is checked too. Between forward edges the output must not change, and the
// feedback path must deliver its sum within the two fast clocks available.
`timescale 1ns/1ps
module tb_iir_sos_df1;
  import fp_pkg::*;
  import fp_ref_pkg::*;
  import dsp_stim_pkg::*;

  localparam int NSAMP = 400;

  logic      clk = 1'b0;
  logic      rst_n = 1'b0;
  logic      fd_en = 1'b0;
  fp32_t     x = 32'h3F80_0000;
  sos_coef_t coef;
  fp32_t     y;
  int        checks = 0, failures = 0;

  iir_sos_df1 dut (.clk, .rst_n, .fd_en, .x, .coef, .y);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  fp32_t xs [int];   // xs[k]: input sampled at forward edge k
  fp32_t ys [int];   // ys[k]: reference output after forward edge k
  fp32_t ws [int];   // internal state (Direct form II only)

  function automatic fp32_t h(ref fp32_t a [int], input int k);
    return (k < 0) ? FP_ZERO : a[k];
  endfunction

  function automatic fp32_t mul(fp32_t a, fp32_t b);
    return ref_mul(a, b);
  endfunction

  function automatic fp32_t add(fp32_t a, fp32_t b);
    return ref_add(a, b);
  endfunction

  // Reference output after forward edge k (xs up to k is known).
  function automatic fp32_t ref_step(int k);
    fp32_t f, fb;
    f  = add(mul(coef.b0, h(xs, k - 2)), add(mul(coef.b1, h(xs, k - 3)), mul(coef.b2, h(xs, k - 4))));
    fb = add(mul(coef.a1, h(ys, k - 1)), mul(coef.a2, h(ys, k - 2)));
    return add(f, fb);
  endfunction

  initial begin
    fp32_t held;
    for (int kind = 0; kind < 2; kind++) begin
      coef  = sos_coef(kind + 1, kind);
      rst_n = 1'b0;
      fd_en = 1'b0;
      xs.delete(); ys.delete(); ws.delete();
      repeat (2) @(posedge clk);
      #1 rst_n = 1'b1;
      x = sig_sample(0);
      for (int k = 0; k < NSAMP; k++) begin
        // Two fast-only clocks, then a forward edge.
        held = y;
        fd_en = 1'b0;
        repeat (2) begin
          @(posedge clk); #1;
          checks++;
          if (y !== held) failures++;
        end
        fd_en = 1'b1;
        @(posedge clk);
        xs[k] = x;
        ys[k] = ref_step(k);
        #1;
        fd_en = 1'b0;
        if (k >= 8) begin
          checks++;
          if (y !== ys[k]) begin
            failures++;
            if (failures < 10) $display("kind %0d sample %0d: y=%h expected %h", kind, k, y, ys[k]);
          end
        end
        x = sig_sample(k + 1 + 500 * kind);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
