// tb_fd_strobe_gen: self-checking testbench for fd_strobe_gen.
//
// Checks, for the default ratio of 3 and for a ratio of 5, that after reset
// the strobe is high exactly one clock in RATIO, first RATIO-1 clocks after
// reset is released, and that a reset in mid-count restarts the phase.
`timescale 1ns/1ps
module tb_fd_strobe_gen;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic fd3, fd5;
  int   checks = 0, failures = 0;

  fd_strobe_gen                u3 (.clk, .rst_n, .fd_en(fd3));
  fd_strobe_gen #(.RATIO(5))   u5 (.clk, .rst_n, .fd_en(fd5));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int run = 0; run < 3; run++) begin
      rst_n = 1'b0;
      repeat (2 + run) @(posedge clk);
      #1 rst_n = 1'b1;
      for (int c = 0; c < 300; c++) begin
        // c counts clocks since reset release; after edge c+1 the count is c+1.
        checks += 2;
        if (fd3 !== ((c % 3) == 2)) failures++;
        if (fd5 !== ((c % 5) == 4)) failures++;
        @(posedge clk); #1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
