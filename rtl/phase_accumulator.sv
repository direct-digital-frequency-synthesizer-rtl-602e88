`timescale 1ps/1ps
// phase_accumulator: N-bit bit-level pipelined phase accumulator.
//
// Every clock the tuning word ftw (M) is added to the accumulated phase, and
// the overflow is dropped, so the top bit is a square wave of frequency
// M * fclk / 2^N. The adder is cut into N one-bit cells (accu_cell) with a
// register on every carry, so the clock period is set by one full adder, not
// by N of them. To keep the sum exact, bit i of the word enters its cell i
// cycles late (input skew), and the accumulated bit i is delayed N-1-i cycles
// (output de-skew), so all bits of `phase` belong to the same sum.
//
// Timing: a new word applied before edge k first shows in `phase` after edge
// k+N-1, i.e. the latency is N cycles (16 for the default width), and a new
// sum appears every cycle. `phase` after edge t equals the sum of all words
// sampled at edges up to t-N+1. Reset clears every register.
// The skew/de-skew arrangement and the 16-bit width follow the document; the
// reset and the absence of an extra input register are this design's choice.
module phase_accumulator #(
  parameter int unsigned N = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] ftw,
  output logic [N-1:0] phase,
  output logic         msb
);

  logic [N-1:0] ftw_skew;  // word bits, bit i delayed i cycles
  logic [N-1:0] acc;       // cell outputs, bit i is i cycles ahead of bit 0
  logic [N:0]   carry;     // carry[i] feeds cell i; carry[N] is the overflow

  assign carry[0] = 1'b0;

  for (genvar i = 0; i < int'(N); i++) begin : g_bit
    pipe_delay #(.DEPTH(i)) u_skew (
      .clk (clk), .rst_n (rst_n), .d (ftw[i]), .q (ftw_skew[i])
    );

    accu_cell u_cell (
      .clk   (clk),
      .rst_n (rst_n),
      .a     (ftw_skew[i]),
      .ci    (carry[i]),
      .s     (acc[i]),
      .co    (carry[i+1])
    );

    pipe_delay #(.DEPTH(N-1-i)) u_deskew (
      .clk (clk), .rst_n (rst_n), .d (acc[i]), .q (phase[i])
    );
  end

  // The overflow carry of the top cell is discarded by design.
  logic overflow_unused;
  assign overflow_unused = carry[N];

  assign msb = phase[N-1];

endmodule
