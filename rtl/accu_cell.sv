`timescale 1ps/1ps
// accu_cell: one bit of the bit-pipelined phase accumulator.
//
// A full adder adds the tuning-word bit a, the cell's own accumulated bit s
// (fed back from its register) and the carry ci from the cell below. On
// every rising clock edge the sum is stored in s and the carry out in co.
// Because the carry is registered, it reaches the next cell one cycle later;
// the phase accumulator skews the tuning word to match. Both registers clear
// on the asynchronous active-low reset (the reset style is this design's
// choice; the document only states that all states start at zero).
module accu_cell (
  input  logic clk,
  input  logic rst_n,
  input  logic a,    // tuning-word bit
  input  logic ci,   // registered carry from the lower bit
  output logic s,    // accumulated bit (registered)
  output logic co    // carry out (registered)
);

  logic sum_d, carry_d;

  full_adder u_fa (
    .a  (a),
    .b  (s),
    .ci (ci),
    .s  (sum_d),
    .co (carry_d)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s  <= 1'b0;
      co <= 1'b0;
    end else begin
      s  <= sum_d;
      co <= carry_d;
    end
  end

endmodule
