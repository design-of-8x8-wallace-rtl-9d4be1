// pp_reduction - reduces the eight partial-product rows of the 8x8
// multiplier to two rows with two layers of 5:2 compressors.
//   layer 1: rows 0..4                         -> sum1, carry1
//   layer 2: sum1, carry1, rows 5, 6, 7        -> sum2, carry2
// The column height thus goes 8 -> 5 -> 2. The output rows satisfy
//   sum2 + carry2 = pp[0] + ... + pp[7]   (mod 2**16),
// and since an 8x8 product fits in 16 bits, the final adder gives the exact
// product. The grouping of rows into the two layers is a choice of this
// design. Combinational, no clock.
module pp_reduction
  import mult_pkg::*;
(
  input  row_t [OP_W-1:0] pp,      // eight weighted partial-product rows
  output row_t            sum,     // two rows left for the final adder
  output row_t            carry
);
  row_t sum1, carry1;

  compressor_row #(.N(PROD_W)) u_layer1 (
    .x    ({pp[4], pp[3], pp[2], pp[1], pp[0]}),
    .sum  (sum1),
    .carry(carry1)
  );
  compressor_row #(.N(PROD_W)) u_layer2 (
    .x    ({pp[7], pp[6], pp[5], carry1, sum1}),
    .sum  (sum),
    .carry(carry)
  );
endmodule
