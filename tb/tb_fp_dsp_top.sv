// tb_fp_dsp_top: end-to-end testbench of fp_dsp_top at its default size
// (order-64 FIR filters, four-section IIR filters).
//
// All parts run at once from one clock:
//  - the three FIR filters get one low pass coefficient set and a new sample
//    every enabled clock, with random stalls of fir_en; their outputs are
//    compared bit for bit with references evaluating the filter sum in each
//    structure's association order and latency, and Direct and Transposed
//    outputs must also be identical to each other;
//  - the three IIR cascades get one coefficient set and a new sample after
//    every forward strobe of the design; each is compared with a per-section
//    difference-equation reference;
//  - the multiplier-accumulator first accumulates ordinary products, then
//    products small enough to give subnormal numbers, then products large
//    enough to overflow the accumulator to infinity, checked against a cycle
//    model.
// The testbench counts how often each mechanism occurred (FIR stalls, IIR
// forward strobes with the fast-only clocks between them, subnormal and
// overflow results of the accumulator) and counts a failure for any that
// never occurred.
`timescale 1ns/1ps
module tb_fp_dsp_top;
  import fp_pkg::*;
  import fp_ref_pkg::*;
  import dsp_stim_pkg::*;

  localparam int FIR_ORDER    = 64;
  localparam int IIR_SECTIONS = 4;
  localparam int NCYC         = 2400;

  logic                          clk = 1'b0;
  logic                          rst_n = 1'b0;
  logic                          fir_en = 1'b0;
  fp32_t                         fir_x = 32'h3F80_0000;
  fp32_t [FIR_ORDER:0]           fir_coef;
  fp32_t                         fir_y_direct, fir_y_transposed, fir_y_tree;
  fp32_t                         iir_x = 32'h3F80_0000;
  sos_coef_t [IIR_SECTIONS-1:0]  iir_coef;
  logic                          iir_fd_en;
  fp32_t                         iir_y [3];
  logic                          mac_en = 1'b0;
  fp32_t                         mac_in1 = '0, mac_in2 = '0;
  fp32_t                         mac_acc;
  int                            checks = 0, failures = 0;
  int                            n_stall = 0, n_fd = 0, n_fast = 0, n_sub = 0, n_ovf = 0;

  fp_dsp_top dut (
    .clk, .rst_n,
    .fir_en, .fir_x, .fir_coef, .fir_y_direct, .fir_y_transposed, .fir_y_tree,
    .iir_x, .iir_coef, .iir_fd_en,
    .iir_y_df1(iir_y[0]), .iir_y_df2(iir_y[1]), .iir_y_tdf2(iir_y[2]),
    .mac_en, .mac_in1, .mac_in2, .mac_acc);

  always #5 clk = ~clk;

  initial begin
    repeat (NCYC + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, fp32_t got, fp32_t expv);
    checks++;
    if (got !== expv) begin
      failures++;
      if (failures < 12) $display("%s: got %h expected %h at %0t", what, got, expv, $time);
    end
  endtask

  // ---------------- FIR reference ----------------
  localparam int LEVELS = $clog2(FIR_ORDER + 1);
  fp32_t xh [int];

  function automatic fp32_t fir_chain(int j);
    fp32_t acc;
    acc = ref_mul(fir_coef[FIR_ORDER], xh[j - 1 - FIR_ORDER]);
    for (int k = FIR_ORDER - 1; k >= 0; k--)
      acc = ref_add(ref_mul(fir_coef[k], xh[j - 1 - k]), acc);
    return acc;
  endfunction

  function automatic fp32_t fir_tree(int j);
    fp32_t v [$];
    fp32_t nv [$];
    for (int k = 0; k <= FIR_ORDER; k++) v.push_back(ref_mul(fir_coef[k], xh[j - LEVELS - k]));
    while (v.size() > 1) begin
      nv = {};
      for (int i = 0; i < v.size(); i += 2)
        nv.push_back((i + 1 < v.size()) ? ref_add(v[i], v[i+1]) : v[i]);
      v = nv;
    end
    return v[0];
  endfunction

  // ---------------- IIR reference ----------------
  fp32_t rx [3*IIR_SECTIONS][int];
  fp32_t ry [3*IIR_SECTIONS][int];
  fp32_t rw [3*IIR_SECTIONS][int];

  function automatic fp32_t g(ref fp32_t a [3*IIR_SECTIONS][int], input int s, input int k);
    return (k < 0) ? FP_ZERO : a[s][k];
  endfunction

  function automatic void iir_edge(int k, fp32_t xin);
    for (int st = 0; st < 3; st++) begin
      for (int i = 0; i < IIR_SECTIONS; i++) begin
        int        s;
        sos_coef_t c;
        s = st * IIR_SECTIONS + i;
        c = iir_coef[i];
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
    int    j, k;
    fp32_t m_prod, m_acc, held;
    logic  fd_now;
    for (int i = 0; i <= FIR_ORDER; i++) fir_coef[i] = fir_coef_of(i);
    for (int i = 0; i < IIR_SECTIONS; i++) iir_coef[i] = sos_coef(i, 0);
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    j = 0; k = 0;
    m_prod = FP_ZERO; m_acc = FP_ZERO;
    fir_x  = sig_sample(0);
    iir_x  = sig_sample(5000);
    fir_en = 1'b1;
    mac_en = 1'b1;
    held   = FP_ZERO;
    for (int c = 0; c < NCYC; c++) begin
      // MAC operands: ordinary, then subnormal-producing, then overflowing.
      if (c < 800) begin
        mac_in1 = sig_sample(c + 9000); mac_in2 = sig_sample(c + 9500);
      end else if (c < 1400) begin
        mac_in1 = {sig_sample(c)[31], 8'd60, sig_sample(c)[22:0]};
        mac_in2 = {1'b0, 8'd60, sig_sample(c + 1)[22:0]};
        if (c == 800) begin m_acc = FP_ZERO; end
      end else begin
        mac_in1 = 32'h7E80_0000; mac_in2 = 32'h4000_0000;
      end
      fd_now = iir_fd_en;
      @(posedge clk);
      // FIR bookkeeping.
      if (fir_en) begin
        xh[j] = fir_x;
        j++;
      end
      // IIR bookkeeping.
      if (fd_now) begin
        iir_edge(k, iir_x);
        k++;
        n_fd++;
      end else begin
        n_fast++;
      end
      // MAC model.
      if (c == 800) m_acc = FP_ZERO;
      m_acc  = ref_add(m_prod, m_acc);
      m_prod = ref_mul(mac_in1, mac_in2);
      #1;
      // FIR checks.
      if (fir_en && (j - 2 - (LEVELS - 1) - FIR_ORDER) >= 0) begin
        check("fir direct", fir_y_direct, fir_chain(j - 1));
        check("fir transposed", fir_y_transposed, fir_chain(j - 1));
        check("fir tree", fir_y_tree, fir_tree(j - 1));
        check("fir direct vs transposed", fir_y_direct, fir_y_transposed);
      end else if (!fir_en) begin
        check("fir hold", fir_y_direct, held);
      end
      held = fir_y_direct;
      // IIR checks.
      if (fd_now && k > 30)
        for (int st = 0; st < 3; st++)
          check($sformatf("iir structure %0d", st), iir_y[st],
                ry[st * IIR_SECTIONS + IIR_SECTIONS - 1][k - 1]);
      if (fd_now) iir_x = sig_sample(5000 + k);
      // MAC check (restart of the accumulation at cycle 800 by reset).
      if (c != 800) check("mac", mac_acc, m_acc);
      if (fp_is_subnormal(mac_acc[30:0])) n_sub++;
      if (fp_is_inf(mac_acc[30:0])) n_ovf++;
      // Next FIR sample with occasional stall.
      fir_en = ($urandom % 10) != 0;
      if (!fir_en) n_stall++;
      fir_x = sig_sample(j + 1);
      // Restart the accumulator between the two MAC phases.
      if (c == 799) begin
        rst_n = 1'b0; #1 rst_n = 1'b1;
        m_prod = FP_ZERO; m_acc = FP_ZERO;
        xh.delete(); j = 0;
        foreach (rx[s]) begin rx[s].delete(); ry[s].delete(); rw[s].delete(); end
        k = 0;
        held = FP_ZERO;
      end
    end
    $display("mechanisms: fir_stalls=%0d iir_fd_strobes=%0d fast_only_clocks=%0d mac_subnormal=%0d mac_overflow=%0d",
             n_stall, n_fd, n_fast, n_sub, n_ovf);
    if (n_stall == 0) failures++;
    if (n_fd == 0 || n_fast == 0) failures++;
    if (n_sub == 0) failures++;
    if (n_ovf == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic fp32_t fir_coef_of(int i);
    return dsp_stim_pkg::fir_coef(FIR_ORDER, 0, i);
  endfunction
endmodule
