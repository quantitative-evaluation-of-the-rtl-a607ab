// fd_strobe_gen: forward-clock strobe for the IIR second-order sections.
//
// The IIR sections run their feedback-loop units on a clock three times
// faster than the clock of their forward path, so that a value leaving the
// output adder can cross the feedback multiplier and the feedback adder (two
// fast periods) and be back at the output adder for the next sample. Here the
// fast clock is the only clock, and the forward path is updated on the cycles
// where fd_en is high: one cycle in RATIO, starting RATIO-1 cycles after reset.
// A forward-path register with its enable driven by fd_en behaves like a
// register on a clock of 1/RATIO the frequency whose rising edges coincide with
// every RATIO-th fast edge.
//
// Following the source design: the 3:1 ratio between the feedback clock and
// the forward clock, with aligned edges.
// Own choices: one clock plus an enable strobe instead of two clock signals;
// the phase after reset.
//
// Interface: fd_en, high for one clk cycle every RATIO cycles.
module fd_strobe_gen #(
  parameter int unsigned RATIO = 3
) (
  input  logic clk,
  input  logic rst_n,
  output logic fd_en
);

  localparam int unsigned CW = (RATIO > 1) ? $clog2(RATIO) : 1;
  localparam logic [CW-1:0] LAST = CW'(RATIO - 1);

  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                 cnt <= '0;
    else if (cnt == LAST)  cnt <= '0;
    else                        cnt <= cnt + 1'b1;
  end

  assign fd_en = (cnt == LAST);

endmodule
