// cmha: carry-maskable half adder (CMHA).
//
// A half adder in which the XOR is built from its NAND/OR/AND decomposition:
// u = NAND(a, b, mask_x), w = OR(a, b), s = AND(u, w), cout = NOT(u).
// The NAND that belongs to the XOR is reused for the carry, and widening it
// to three inputs with mask_x gives the masking:
//   mask_x = 1 : s = a XOR b, cout = a AND b   (exact half adder)
//   mask_x = 0 : s = a OR b,  cout = 0         (approximate, carry masked)
// The gate structure follows the published circuit. Purely combinational.
`timescale 1ns / 1ps
module cmha (
  input  logic a,
  input  logic b,
  input  logic mask_x,  // 1: exact, 0: carry masked
  output logic s,
  output logic cout
);

  logic u;  // 3-input NAND shared by sum and carry
  logic w;  // OR half of the XOR

  always_comb begin
    u    = ~(a & b & mask_x);
    w    = a | b;
    s    = u & w;
    cout = ~u;
  end

endmodule
