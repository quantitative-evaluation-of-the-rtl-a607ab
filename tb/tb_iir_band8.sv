// tb_iir_band8: band-pass sized workload for iir_cascade.
//
// A band-pass or band-stop IIR filter of order 8 has twice the coefficients of
// a low-pass or high-pass one, so the cascade is built here with eight
// second-order sections. The first four sections are low-pass sections and
// the last four high-pass sections, whose product is a band-pass response.
// The cascade is instantiated once per section structure (Direct form I,
// Direct form II, Transposed Direct form II), with the same coefficients and
// input, driven by the fast clock and a forward strobe high one clock in
// three. A single-precision reference evaluates every section in the
// association order of its structure; all three outputs are compared bit for
// bit after every forward edge, which also checks the latency of 3 register
// stages per Direct form I or II section and 2 per Transposed Direct form II
// section.
`timescale 1ns/1ps
module tb_iir_band8;
  import fp_pkg::*;
  import fp_ref_pkg::*;
  import dsp_stim_pkg::*;

  localparam int SECTIONS = 8;
  localparam int NSAMP    = 500;

  logic                      clk = 1'b0;
  logic                      rst_n = 1'b0;
  logic                      fd_en = 1'b0;
  fp32_t                     x = 32'h3F80_0000;
  sos_coef_t [SECTIONS-1:0]  coef;
  fp32_t                     y [3];
  int                        checks = 0, failures = 0;

  iir_cascade #(.STRUCTURE(SOS_DF1),  .SECTIONS(SECTIONS)) u_df1  (.clk, .rst_n, .fd_en, .x, .coef, .y(y[0]));
  iir_cascade #(.STRUCTURE(SOS_DF2),  .SECTIONS(SECTIONS)) u_df2  (.clk, .rst_n, .fd_en, .x, .coef, .y(y[1]));
  iir_cascade #(.STRUCTURE(SOS_TDF2), .SECTIONS(SECTIONS)) u_tdf2 (.clk, .rst_n, .fd_en, .x, .coef, .y(y[2]));

  always #5 clk = ~clk;

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference histories, indexed [structure*SECTIONS + section][forward edge].
  fp32_t rx [3*SECTIONS][int];
  fp32_t ry [3*SECTIONS][int];
  fp32_t rw [3*SECTIONS][int];

  function automatic fp32_t g(ref fp32_t a [3*SECTIONS][int], input int s, input int k);
    return (k < 0) ? FP_ZERO : a[s][k];
  endfunction

  function automatic void ref_edge(int k, fp32_t xin);
    for (int st = 0; st < 3; st++) begin
      for (int i = 0; i < SECTIONS; i++) begin
        int        s;
        sos_coef_t c;
        s = st * SECTIONS + i;
        c = coef[i];
        rx[s][k] = (i == 0) ? xin : g(ry, s - 1, k - 1);
        case (st)
          0: ry[s][k] = ref_add(
                 ref_add(ref_mul(c.b0, g(rx, s, k - 2)),
                         ref_add(ref_mul(c.b1, g(rx, s, k - 3)), ref_mul(c.b2, g(rx, s, k - 4)))),
                 ref_add(ref_mul(c.a1, g(ry, s, k - 1)), ref_mul(c.a2, g(ry, s, k - 2))));
          1: begin
            rw[s][k] = ref_add(rx[s][k],
                 ref_add(ref_mul(c.a1, g(rw, s, k - 1)), ref_mul(c.a2, g(rw, s, k - 2))));
            ry[s][k] = ref_add(ref_mul(c.b0, g(rw, s, k - 2)),
                 ref_add(ref_mul(c.b1, g(rw, s, k - 3)), ref_mul(c.b2, g(rw, s, k - 4))));
          end
          default: ry[s][k] = ref_add(ref_mul(c.b0, g(rx, s, k - 1)),
                 ref_add(ref_mul(c.a1, g(ry, s, k - 1)),
                   ref_add(ref_mul(c.b1, g(rx, s, k - 2)),
                     ref_add(ref_mul(c.b2, g(rx, s, k - 3)), ref_mul(c.a2, g(ry, s, k - 2))))));
        endcase
      end
    end
  endfunction

  initial begin
    for (int i = 0; i < SECTIONS; i++) coef[i] = sos_coef(i % 4, i / 4);
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    x = sig_sample(0);
    for (int k = 0; k < NSAMP; k++) begin
      fd_en = 1'b0;
      repeat (2) @(posedge clk);
      #1 fd_en = 1'b1;
      @(posedge clk);
      ref_edge(k, x);
      #1 fd_en = 1'b0;
      if (k >= 20) begin
        for (int st = 0; st < 3; st++) begin
          checks++;
          if (y[st] !== ry[st * SECTIONS + SECTIONS - 1][k]) begin
            failures++;
            if (failures < 10)
              $display("structure %0d sample %0d: y=%h expected %h", st, k, y[st],
                       ry[st * SECTIONS + SECTIONS - 1][k]);
          end
        end
      end
      x = sig_sample(k + 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
