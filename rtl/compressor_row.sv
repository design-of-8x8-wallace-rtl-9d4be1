// compressor_row - a row of 5:2 compressors across all N columns.
// Column i compresses bit i of the five input rows x[0..4] together with
// the two carries cout1, cout2 of column i-1 (column 0 gets zeros). It yields
// a sum row and a carry row; the carry row is returned already shifted one
// column up, so that
//   x[0]+x[1]+x[2]+x[3]+x[4] = sum + carry   (mod 2**N).
// The couts of the top column (weight 2**N) are dropped: the caller keeps N
// wide enough for its result. Combinational. Default N = 16.
module compressor_row
  import mult_pkg::*;
#(
  parameter int unsigned N = PROD_W
) (
  input  logic [4:0][N-1:0] x,      // five rows to add
  output logic      [N-1:0] sum,    // weight 2**i at bit i
  output logic      [N-1:0] carry   // already shifted: weight 2**i at bit i
);
  logic [N:0] c1, c2;   // c1[i], c2[i]: carries into column i
  logic [N-1:0] cy;     // unshifted carry outputs

  assign c1[0] = 1'b0;
  assign c2[0] = 1'b0;
  for (genvar i = 0; i < N; i++) begin : g_col
    compressor_5_2 u_cmp (
      .x1(x[0][i]), .x2(x[1][i]), .x3(x[2][i]), .x4(x[3][i]), .x5(x[4][i]),
      .cin1(c1[i]), .cin2(c2[i]),
      .sum(sum[i]), .carry(cy[i]), .cout1(c1[i+1]), .cout2(c2[i+1])
    );
  end
  assign carry = {cy[N-2:0], 1'b0};
endmodule
