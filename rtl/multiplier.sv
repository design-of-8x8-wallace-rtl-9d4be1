// multiplier - 8x8 unsigned compressor-based Wallace multiplier.
// result = x * y, purely combinational (no clock, no registers): a new
// product appears one propagation delay after the operands change.
// Three stages:
//   1. partial_product_gen: 64 AND gates give eight weighted rows;
//   2. pp_reduction: two layers of MUX-based 5:2 compressors take the
//      column height from 8 to 2;
//   3. carry_select_adder: a 16-bit carry-select adder of 4-bit blocks,
//      whose ripple adders use full adders made of two 8:1 multiplexers,
//      adds the two rows. Its carry out is always 0 for an 8x8 product and
//      is not brought out.
// Ports are named after the operand and result signals of the design
// (x[7:0], y[7:0], result[15:0]): 16 inputs and 16 outputs.
module multiplier
  import mult_pkg::*;
(
  input  logic [OP_W-1:0]   x,
  input  logic [OP_W-1:0]   y,
  output logic [PROD_W-1:0] result
);
  row_t [OP_W-1:0] pp;
  row_t            red_sum, red_carry;
  logic            unused_cout;

  partial_product_gen #(.W(OP_W)) u_ppg (.x(x), .y(y), .pp(pp));

  pp_reduction u_red (.pp(pp), .sum(red_sum), .carry(red_carry));

  carry_select_adder #(.N(PROD_W), .BLOCK(CSA_BLOCK)) u_cpa (
    .a   (red_sum),
    .b   (red_carry),
    .cin (1'b0),
    .s   (result),
    .cout(unused_cout)
  );
endmodule
