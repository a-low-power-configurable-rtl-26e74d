// cmfa: carry-maskable full adder (CMFA).
//
// A full adder made of two half adders and an OR for the carry. The first
// half adder, on a and b, is the carry-maskable one (see cmha): its XOR is
// NAND/OR/AND with a 3-input NAND that takes mask_x. The second half adder
// adds the carry in to the first one's partial sum and is an ordinary half
// adder in the same NAND/OR/AND form.
//   mask_x = 1             : {cout, s} = a + b + cin        (exact)
//   mask_x = 0, cin = 0    : s = a OR b, cout = 0           (carry masked)
//   mask_x = 0, cin = 1    : {cout, s} = (a OR b) + 1
// The first two rows are the published behaviour; the structure of the
// second half adder, and hence the last row, is this design's choice.
// Purely combinational.
`timescale 1ns / 1ps
module cmfa (
  input  logic a,
  input  logic b,
  input  logic cin,
  input  logic mask_x,  // 1: exact, 0: carry masked
  output logic s,
  output logic cout
);

  logic u1, w1, p, g;  // first (maskable) half adder
  logic u2, w2;        // second half adder

  always_comb begin
    u1   = ~(a & b & mask_x);
    w1   = a | b;
    p    = u1 & w1;    // a XOR b, or a OR b when masked
    g    = ~u1;        // a AND b, or 0 when masked
    u2   = ~(p & cin);
    w2   = p | cin;
    s    = u2 & w2;    // p XOR cin
    cout = g | ~u2;    // generate, or propagate of the carry in
  end

endmodule
