// 7:2 compressor: seven bits of one column plus two carries from the
// column two places below.
//
//   X1+...+X7 + cin1 + cin2 = sum + 2*carry + 4*(cout1 + cout2)
//
// sum stays in this column, carry goes one column up, and cout1/cout2 go
// two columns up, where they enter that column's 7:2 compressor as cin1
// and cin2. The sum of nine bits is at most 9, and the outputs can hold
// up to 11, so nothing is lost.
//
// Structure (all combinational), from two 4:2 compressors, one half adder
// and two full adders:
//   4:2 A : X1, X2, X3, X4, cin = cin1        -> s1, c1, c2
//   4:2 B : X5, X6, X7, cin2,  cin = 0         -> s2, c21, c22
//   HA    : s1, s2          -> sum,  s3       (sum = s1 ^ s2)
//   FA 1  : s3, c1, c21     -> t,    cout1
//   FA 2  : t,  c2, c22     -> carry, cout2
// The block set and the first three lines follow the published
// compressor. There the second full adder takes the first one's carry
// together with c2 and c22; those signals do not have the same weight, so
// here it takes the first full adder's sum instead, and both full-adder
// carries leave as weight-4 outputs. Feeding cin2 as the fourth input of
// compressor B, with B's own carry-in tied low, is this design's choice.
//
// Ports: x[0] is X1 ... x[6] is X7.
module compressor_7_2 (
  input  logic [6:0] x,
  input  logic       cin1,
  input  logic       cin2,
  output logic       sum,
  output logic       carry,
  output logic       cout1,
  output logic       cout2
);
  timeunit 1ns; timeprecision 1ps;

  logic s1, c1, c2;      // compressor A: sum, carry, cout
  logic s2, c21, c22;    // compressor B: sum, carry, cout
  logic s3, t;

  compressor_4_2 u_cmp_a (.x(x[3:0]), .cin(cin1),
                          .sum(s1), .carry(c1), .cout(c2));
  compressor_4_2 u_cmp_b (.x({cin2, x[6:4]}), .cin(1'b0),
                          .sum(s2), .carry(c21), .cout(c22));

  half_adder u_ha  (.a(s1), .b(s2), .s(sum), .co(s3));
  full_adder u_fa1 (.a(s3), .b(c1), .c(c21), .s(t),     .co(cout1));
  full_adder u_fa2 (.a(t),  .b(c2), .c(c22), .s(carry), .co(cout2));
endmodule
