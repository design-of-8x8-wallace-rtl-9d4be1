// xor_xnor - XOR-XNOR cell: gives both a ^ b (o) and its complement (ob).
// Combinational. The 5:2 compressor feeds the pair to the data inputs of a
// MUX cell, so that the next bit of the column selects between them and
// forms a three-input XOR without another gate.
module xor_xnor (
  input  logic a,
  input  logic b,
  output logic o,   // a ^ b
  output logic ob   // ~(a ^ b)
);
  always_comb begin
    o  = a ^ b;
    ob = ~(a ^ b);
  end
endmodule
