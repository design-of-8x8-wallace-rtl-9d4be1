// mux2 - 2:1 multiplexer cell: o = sel ? d1 : d0. Combinational.
// It is the MUX cell of the 5:2 compressor and the leaf of the 8:1
// multiplexer; the carry-select adder also uses it to pick its results.
module mux2 (
  input  logic sel,
  input  logic d0,
  input  logic d1,
  output logic o
);
  always_comb o = sel ? d1 : d0;
endmodule
