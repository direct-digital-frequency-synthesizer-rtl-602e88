`timescale 1ps/1ps
// full_adder: one-bit full adder with separate, parallel sum and carry paths.
//
// The carry path forms NAND2(a,b) and NOR2(a,b); the carry-in steers a pass
// gate that picks one of them, and an inverter restores the level, so
// co = ci ? (a|b) : (a&b). The sum path forms XNOR2(a,b) and its inverse; the
// carry-in picks one and an inverter restores it, so s = a^b^ci. Neither path
// waits for the other, which is what lets the transistor-level cell reach
// about 22 ps. This gate-level description follows that structure; it is
// purely combinational.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic s,
  output logic co
);

  logic nand_ab, nor_ab, xnor_ab, xor_ab;
  logic co_n, s_n;

  always_comb begin
    // carry path: NAND2 / NOR2, pass gate selected by ci, restoring inverter
    nand_ab = ~(a & b);
    nor_ab  = ~(a | b);
    co_n    = ci ? nor_ab : nand_ab;
    co      = ~co_n;
    // sum path: XNOR2 and its inverse, pass gate selected by ci, inverter
    xnor_ab = ~(a ^ b);
    xor_ab  = ~xnor_ab;
    s_n     = ci ? xor_ab : xnor_ab;
    s       = ~s_n;
  end

endmodule
