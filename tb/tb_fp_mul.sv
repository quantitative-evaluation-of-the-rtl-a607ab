// tb_fp_mul: self-checking testbench for the pipelined single-precision
// mul multiplier fp_mul.
//
// Drives directed corner cases (signed zeros, subnormals, infinities, NaNs,
// rounding ties, overflow) followed by random operands drawn from all number
// classes, one new pair per clock. Each result is compared, one enabled clock
// later, with a double-precision reference rounded to single precision. It
// also checks that the output holds while en is low (latency is exactly one
// enabled edge).
`timescale 1ns/1ps
module tb_fp_mul;
  import fp_pkg::*;
  import fp_ref_pkg::*;

  logic  clk = 1'b0;
  logic  rst_n = 1'b0;
  logic  en = 1'b1;
  fp32_t a = '0, b = '0;
  fp32_t y;
  int    checks = 0, failures = 0;

  fp_mul dut (.clk, .rst_n, .en, .a, .b, .y);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(fp32_t x, fp32_t z);
    fp32_t expv;
    a = x; b = z;
    expv = ref_mul(x, z);
    @(posedge clk); #1;
    checks++;
    if (y !== expv) begin
      failures++;
      if (failures < 20) $display("MISMATCH %h op %h: got %h expected %h", x, z, y, expv);
    end
  endtask

  initial begin
    fp32_t held;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    checks++;
    if (y !== FP_ZERO) failures++;
    // Directed cases.
    apply(32'h3F800000, 32'h3F800000);
    apply(32'h3F800000, 32'hBF800000);
    apply(32'h80000000, 32'h80000000);
    apply(32'h00000000, 32'h80000000);
    apply(32'h3F800000, 32'h33800000);
    apply(32'h3F800000, 32'h33800001);
    apply(32'h3F800001, 32'h33800000);
    apply(32'h00000001, 32'h00000001);
    apply(32'h007FFFFF, 32'h00000001);
    apply(32'h00800000, 32'h80000001);
    apply(32'h00400000, 32'h40000000);
    apply(32'h00000003, 32'h3F000000);
    apply(32'h00800000, 32'h3F000000);
    apply(32'h7F7FFFFF, 32'h7F7FFFFF);
    apply(32'h7F7FFFFF, 32'h40000000);
    apply(32'h7F800000, 32'hFF800000);
    apply(32'h7F800000, 32'h00000000);
    apply(32'h7FC00000, 32'h3F800000);
    apply(32'h7F800000, 32'h3F800000);
    apply(32'h3F800001, 32'h3F800001);
    apply(32'h4B7FFFFF, 32'h3F800000);
    apply(32'h3F800000, 32'hB3800000);
    // Hold check: with en low the register keeps its value.
    held = y;
    en = 1'b0;
    a = 32'h40400000; b = 32'h40400000;
    repeat (3) @(posedge clk);
    #1 checks++;
    if (y !== held) failures++;
    en = 1'b1;
    // Random operands of every class.
    for (int i = 0; i < 60000; i++)
      apply(rand_fp($urandom, $urandom, $urandom), rand_fp($urandom, $urandom, $urandom));
    // Close exponents, to exercise cancellation.
    for (int i = 0; i < 20000; i++) begin
      int unsigned r;
      r = $urandom;
      apply({r[31], 8'(120 + r[2:0]), 23'($urandom)}, {~r[31], 8'(120 + r[5:3]), 23'($urandom)});
    end
    // Products by small odd integers and by 0.5 land exactly half-way between
    // two neighbours often, which exercises ties to even, also in the
    // subnormal range.
    apply(32'h3F800003, 32'h40400000);
    apply(32'h00000005, 32'h3F000000);
    for (int i = 0; i < 20000; i++) begin
      int unsigned r;
      r = $urandom;
      if (r[0])
        apply({r[31], 8'(100 + r[5:1]), 23'($urandom)}, {1'b0, 8'd128 + 8'(r[7:6]), r[10:8], 20'd0});
      else
        apply({r[31], 8'(r[3:1]), 23'($urandom)}, 32'h3F000000);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
