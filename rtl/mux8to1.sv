// mux8to1 - 8:1 multiplexer.
// The 3-bit select s = {S2,S1,S0} picks one of the eight data inputs d[0..7]
// (I0..I7) and sends it to y. Purely combinational, no clock.
// Built, as a choice of this design, as a tree of three levels of 2:1
// multiplexers (mux2 cells) so that the cell has the same multiplexer
// structure in a netlist as in the circuit diagram of the full adder.
module mux8to1 (
  input  logic [7:0] d,  // data inputs I0..I7
  input  logic [2:0] s,  // select, s[2]=S2 (most significant)
  output logic       y
);
  logic [3:0] l1;
  logic [1:0] l2;

  for (genvar i = 0; i < 4; i++) begin : g_l1
    mux2 u_m (.sel(s[0]), .d0(d[2*i]), .d1(d[2*i+1]), .o(l1[i]));
  end
  for (genvar i = 0; i < 2; i++) begin : g_l2
    mux2 u_m (.sel(s[1]), .d0(l1[2*i]), .d1(l1[2*i+1]), .o(l2[i]));
  end
  mux2 u_l3 (.sel(s[2]), .d0(l2[0]), .d1(l2[1]), .o(y));
endmodule
