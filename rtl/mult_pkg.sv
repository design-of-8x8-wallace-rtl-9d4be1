// Shared sizes and types of the 8x8 compressor-based Wallace multiplier.
// OP_W is the operand width (8), PROD_W the product width (2*OP_W = 16).
// CSA_BLOCK is the block size of the carry-select final adder (4 bits).
// A row_t is one product-wide row of bits; column i of a row has weight 2**i.
package mult_pkg;
  localparam int unsigned OP_W      = 8;
  localparam int unsigned PROD_W    = 2 * OP_W;
  localparam int unsigned CSA_BLOCK = 4;

  typedef logic [PROD_W-1:0] row_t;
endpackage
