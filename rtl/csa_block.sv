// csa_block - one block of a carry-select adder.
// Two W-bit ripple-carry adders add the same operands at once, one with a
// carry-in of 0 and one with a carry-in of 1. When the real carry-in cin
// arrives it only has to steer W+1 2:1 multiplexers that pick the matching
// sum bits and carry-out, so the carry crosses a block in one multiplexer
// delay. Combinational. W defaults to 4, the block size of the design.
module csa_block #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic         cout
);
  logic [W-1:0] s0, s1;
  logic         c0, c1;

  ripple_carry_adder #(.W(W)) u_rca0 (.a(a), .b(b), .cin(1'b0), .s(s0), .cout(c0));
  ripple_carry_adder #(.W(W)) u_rca1 (.a(a), .b(b), .cin(1'b1), .s(s1), .cout(c1));

  for (genvar i = 0; i < W; i++) begin : g_sel
    mux2 u_ms (.sel(cin), .d0(s0[i]), .d1(s1[i]), .o(s[i]));
  end
  mux2 u_mc (.sel(cin), .d0(c0), .d1(c1), .o(cout));
endmodule
