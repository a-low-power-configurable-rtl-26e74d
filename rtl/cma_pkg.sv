// cma_pkg: shared constants and types for the carry-maskable adder (CMA).
//
// The default configuration is a 16-bit adder cut into four 4-bit sub adder
// units. Units 0..2 each take one carry mask bit; unit 3 is always accurate.
// Mask bit k = 0 turns unit k into a bitwise OR with no carry out (provided
// its carry in is also 0); mask bit k = 1 makes it an ordinary adder.
//
// The four accuracy settings evaluated for this adder are named CMA1..CMA4.
// Setting CMAn leaves the (n-1) upper maskable units accurate and masks the
// rest, so 0, 4, 8 or 12 bits below unit 3 take part in carry propagation.
// Masks must be "thermometer" codes (ones only above zeros): a unit that is
// masked but receives a carry from an accurate unit below it does not mask.
`timescale 1ns / 1ps
package cma_pkg;

  // Default geometry of the adder.
  localparam int unsigned CMA_WIDTH      = 16;
  localparam int unsigned CMA_UNIT_WIDTH = 4;
  localparam int unsigned CMA_NUM_UNITS  = CMA_WIDTH / CMA_UNIT_WIDTH;
  localparam int unsigned CMA_MASK_BITS  = CMA_NUM_UNITS - 1;

  typedef logic [CMA_MASK_BITS-1:0] cma_mask_t;

  // Accuracy settings: CMA1 is the least accurate, CMA4 is exact.
  typedef enum logic [1:0] {
    CMA1 = 2'd0,
    CMA2 = 2'd1,
    CMA3 = 2'd2,
    CMA4 = 2'd3
  } cma_setting_e;

  // Mask word for a setting: the top `setting` maskable units are unmasked.
  function automatic cma_mask_t cma_setting_mask(cma_setting_e setting);
    cma_mask_t m;
    for (int unsigned k = 0; k < CMA_MASK_BITS; k++)
      m[k] = (k >= CMA_MASK_BITS - int'(setting));
    return m;
  endfunction

endpackage
