// cma_unit: sub adder unit of the carry-maskable adder.
//
// W bit positions of ripple carry addition that share one carry mask bit.
// Every position is a carry-maskable full adder (cmfa), except that the unit
// at the bottom of the adder (FIRST = 1) starts with a carry-maskable half
// adder (cmha) and ignores cin. The carry ripples from bit 0 to bit W-1 and
// leaves as cout, which feeds the next unit's cin.
//   mask_x = 1             : {cout, s} = a + b + cin       (exact)
//   mask_x = 0, cin = 0    : s = a OR b, cout = 0          (carry masked)
//   mask_x = 0, cin = 1    : {cout, s} = (a OR b) + 1
// Units sharing one mask bit and the CMHA at bit 0 follow the published
// structure; the width parameter allows any unit length. Combinational.
// In the bottom unit the cin port is left unused on purpose (a lint tool
// reports it), so that every unit has the same interface.
`timescale 1ns / 1ps
module cma_unit #(
  parameter int unsigned W     = 4,  // bit positions in this unit
  parameter bit          FIRST = 0   // 1: bit 0 is a CMHA, cin is unused
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  input  logic         mask_x,  // 1: exact, 0: carry masked
  output logic [W-1:0] s,
  output logic         cout
);

  logic [W:0] c;  // c[i] is the carry into bit i

  if (FIRST) begin : g_ha
    assign c[0] = 1'b0;
    cmha u_cmha (
      .a     (a[0]),
      .b     (b[0]),
      .mask_x(mask_x),
      .s     (s[0]),
      .cout  (c[1])
    );
  end else begin : g_fa
    assign c[0] = cin;
    cmfa u_cmfa (
      .a     (a[0]),
      .b     (b[0]),
      .cin   (c[0]),
      .mask_x(mask_x),
      .s     (s[0]),
      .cout  (c[1])
    );
  end

  for (genvar i = 1; i < W; i++) begin : g_bit
    cmfa u_cmfa (
      .a     (a[i]),
      .b     (b[i]),
      .cin   (c[i]),
      .mask_x(mask_x),
      .s     (s[i]),
      .cout  (c[i+1])
    );
  end

  assign cout = c[W];

endmodule
