// partial_product_gen - partial-product generation of an OP_W x OP_W
// unsigned multiplier: every bit of x is ANDed with every bit of y
// (OP_W*OP_W AND gates). Row j is x AND y[j], placed j columns up in a
// product-wide row, so the rows add up to x*y. Combinational.
// Default OP_W = 8, which gives 8 rows of 16 bits.
module partial_product_gen
  import mult_pkg::*;
#(
  parameter int unsigned W = OP_W
) (
  input  logic [W-1:0]              x,
  input  logic [W-1:0]              y,
  output logic [W-1:0][2*W-1:0]     pp   // pp[j] = (x & {W{y[j]}}) << j
);
  always_comb begin
    for (int j = 0; j < W; j++) begin
      pp[j] = '0;
      for (int i = 0; i < W; i++) pp[j][i+j] = x[i] & y[j];
    end
  end
endmodule
