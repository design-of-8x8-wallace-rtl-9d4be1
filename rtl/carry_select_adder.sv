// carry_select_adder - N-bit carry-select adder, the final (carry-propagate)
// adder of the multiplier.
// The operands are cut into N/BLOCK blocks of BLOCK bits (csa_block). Every
// block computes both possible results in parallel, and the carry out of
// block k selects the result of block k+1. The lowest block is a carry-select
// block too, fed with cin, so all blocks are alike (a choice of this design).
// Combinational. Defaults: N = 16 (the product width), BLOCK = 4.
// N must be a multiple of BLOCK.
module carry_select_adder
  import mult_pkg::*;
#(
  parameter int unsigned N     = PROD_W,
  parameter int unsigned BLOCK = CSA_BLOCK
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] s,
  output logic         cout
);
  localparam int unsigned NB = N / BLOCK;
  logic [NB:0] c;  // c[k] is the carry into block k

  initial assert (N % BLOCK == 0) else $error("N must be a multiple of BLOCK");

  assign c[0] = cin;
  for (genvar k = 0; k < NB; k++) begin : g_blk
    csa_block #(.W(BLOCK)) u_blk (
      .a   (a[k*BLOCK +: BLOCK]),
      .b   (b[k*BLOCK +: BLOCK]),
      .cin (c[k]),
      .s   (s[k*BLOCK +: BLOCK]),
      .cout(c[k+1])
    );
  end
  assign cout = c[NB];
endmodule
