// cma: carry-maskable adder (CMA), the top of the design.
//
// An N-bit unsigned ripple carry adder whose accuracy is chosen at run time
// by a carry mask. The adder is a chain of N/UNIT_W sub adder units
// (cma_unit); unit 0 starts with a carry-maskable half adder. Each unit below
// the top one has its own mask bit mask_x[k]: 0 makes the unit add bitwise
// OR with its carry out held at 0, 1 makes it exact. The top unit has no mask
// bit and is always exact, unless MASK_LAST = 1 gives it one too.
//
// Default: N = 16, UNIT_W = 4, MASK_LAST = 0, so mask_x is 3 bits wide.
// With a thermometer mask (zeros in the low units, ones above) the low k bits
// of the sum are a OR b, no carry leaves them, and the error of the sum is
// exactly (a AND b) over those k bits. CMA1..CMA4 use masks 000, 100, 110,
// 111. A mask with a zero above a one does not mask that unit's carry path,
// since the carry arriving from below is still propagated.
// Setting UNIT_W = 1 and MASK_LAST = 1 gives one mask bit per bit position.
//
// s is N+1 bits: s[N] is the carry out of the top unit. Combinational; the
// delay is that of the carry chain through the unmasked units.
// Unit lengths are all equal here, although unequal lengths would also work.
`timescale 1ns / 1ps
module cma
  import cma_pkg::*;
#(
  parameter int unsigned N         = CMA_WIDTH,       // operand width
  parameter int unsigned UNIT_W    = CMA_UNIT_WIDTH,  // bits per sub adder unit
  parameter bit          MASK_LAST = 0,               // 1: top unit is maskable too
  localparam int unsigned NUM_UNITS = N / UNIT_W,
  localparam int unsigned MASK_BITS = MASK_LAST ? NUM_UNITS : NUM_UNITS - 1
) (
  input  logic [N-1:0]         a,
  input  logic [N-1:0]         b,
  input  logic [MASK_BITS-1:0] mask_x,  // per unit: 1 exact, 0 carry masked
  output logic [N:0]           s
);

  if (N % UNIT_W != 0 || MASK_BITS < 1) begin : g_bad_geometry
    $error("cma: N must be a multiple of UNIT_W, with at least one maskable unit");
  end

  logic [NUM_UNITS:0]   c;     // c[k] is the carry into unit k
  logic [NUM_UNITS-1:0] mask;  // per-unit mask, top unit included

  assign c[0] = 1'b0;

  if (MASK_LAST) begin : g_mask_all
    assign mask = mask_x;
  end else begin : g_mask_low
    assign mask = {1'b1, mask_x};
  end

  for (genvar k = 0; k < NUM_UNITS; k++) begin : g_unit
    cma_unit #(
      .W    (UNIT_W),
      .FIRST(k == 0)
    ) u_unit (
      .a     (a[k*UNIT_W +: UNIT_W]),
      .b     (b[k*UNIT_W +: UNIT_W]),
      .cin   (c[k]),
      .mask_x(mask[k]),
      .s     (s[k*UNIT_W +: UNIT_W]),
      .cout  (c[k+1])
    );
  end

  assign s[N] = c[NUM_UNITS];

endmodule
