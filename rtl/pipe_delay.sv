`timescale 1ps/1ps
// pipe_delay: a chain of DEPTH one-bit registers.
//
// q follows d DEPTH clock cycles later. With DEPTH = 0 the chain is a wire
// and clk and rst_n are left unused (bit 0 of the accumulator needs no skew).
// The phase accumulator uses these chains to skew the tuning-word bits on the
// way in and to re-align the accumulated bits on the way out. All registers
// clear on the asynchronous active-low reset. The register chains follow the
// source design's pipeline; the reset is this design's choice.
module pipe_delay #(
  parameter int unsigned DEPTH = 1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic d,
  output logic q
);

  if (DEPTH == 0) begin : g_wire
    assign q = d;
  end else begin : g_regs
    logic [DEPTH-1:0] sr;
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        sr <= '0;
      end else begin
        sr[0] <= d;
        for (int i = 1; i < int'(DEPTH); i++) sr[i] <= sr[i-1];
      end
    end
    assign q = sr[DEPTH-1];
  end

endmodule
