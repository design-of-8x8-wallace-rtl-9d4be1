// ripple_carry_adder - W-bit ripple-carry adder of MUX-based full adders.
// Bit i adds a[i], b[i] and the carry out of bit i-1; the carry out of the
// top bit is cout. It is the adder that each carry-select block holds twice.
// Combinational. W defaults to 4, the block size of the carry-select adder.
module ripple_carry_adder #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic         cout
);
  logic [W:0] c;
  assign c[0] = cin;
  for (genvar i = 0; i < W; i++) begin : g_bit
    mux_full_adder u_fa (.a(a[i]), .b(b[i]), .cin(c[i]), .s(s[i]), .cout(c[i+1]));
  end
  assign cout = c[W];
endmodule
