// mux_full_adder - one-bit full adder built from two 8:1 multiplexers.
// A, B and Cin drive the selects (A on S2, B on S1, Cin on S0) of both
// multiplexers; their data inputs are tied to the sum and carry columns of
// the full-adder truth table, read top to bottom for select codes 0..7:
//   sum   column 0,1,1,0,1,0,0,1
//   carry column 0,0,0,1,0,1,1,1
// This is the structure the design is built around. Combinational, no clock.
module mux_full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic s,
  output logic cout
);
  // Bit k of each constant is the table entry for select code k = {a,b,cin}.
  localparam logic [7:0] SUM_COLUMN   = 8'b1001_0110;
  localparam logic [7:0] CARRY_COLUMN = 8'b1110_1000;

  mux8to1 u_sum   (.d(SUM_COLUMN),   .s({a, b, cin}), .y(s));
  mux8to1 u_carry (.d(CARRY_COLUMN), .s({a, b, cin}), .y(cout));
endmodule
