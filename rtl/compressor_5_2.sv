// compressor_5_2 - MUX-based 5:2 compressor for one column of the
// partial-product matrix.
// Inputs: five bits x1..x5 of the column and two carries cin1, cin2 that
// come from the column one place lower. Outputs: sum (weight of this column)
// and carry, cout1, cout2 (weight of the next column), so that
//   x1+x2+x3+x4+x5+cin1+cin2 = sum + 2*(carry + cout1 + cout2).
// cout1 and cout2 do not depend on cin1 or cin2, so a row of compressors has
// no carry ripple: each column's couts go straight to the next column's cins.
// Inside (this design's own arrangement of the XOR-XNOR and MUX cells):
//   stage 1  p1 = x1^x2;  s1 = x3 ? ~p1 : p1;   cout1 = p1 ? x3 : x1
//   stage 2  p2 = x4^x5;  s2 = s1 ? ~p2 : p2;   cout2 = p2 ? s1 : x4
//   stage 3  p3 = cin1^cin2; sum = s2 ? ~p3 : p3; carry = p3 ? s2 : cin1
// Each stage is a full adder whose XOR of three bits is a MUX choosing
// between an XOR and an XNOR, and whose carry is a MUX choosing between
// two of its inputs. Combinational, no clock.
module compressor_5_2 (
  input  logic x1, x2, x3, x4, x5,
  input  logic cin1, cin2,
  output logic sum,
  output logic carry,
  output logic cout1,
  output logic cout2
);
  logic p1, p1n, s1;
  logic p2, p2n, s2;
  logic p3, p3n;

  // stage 1: x1, x2, x3
  xor_xnor u_xx1 (.a(x1), .b(x2), .o(p1), .ob(p1n));
  mux2     u_s1  (.sel(x3), .d0(p1), .d1(p1n), .o(s1));
  mux2     u_c1  (.sel(p1), .d0(x1), .d1(x3),  .o(cout1));

  // stage 2: s1, x4, x5
  xor_xnor u_xx2 (.a(x4), .b(x5), .o(p2), .ob(p2n));
  mux2     u_s2  (.sel(s1), .d0(p2), .d1(p2n), .o(s2));
  mux2     u_c2  (.sel(p2), .d0(x4), .d1(s1),  .o(cout2));

  // stage 3: s2, cin1, cin2
  xor_xnor u_xx3 (.a(cin1), .b(cin2), .o(p3), .ob(p3n));
  mux2     u_s3  (.sel(s2), .d0(p3),   .d1(p3n), .o(sum));
  mux2     u_c3  (.sel(p3), .d0(cin1), .d1(s2),  .o(carry));
endmodule
