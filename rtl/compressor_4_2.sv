// 4:2 compressor built from XOR-XNOR cells and 2:1 multiplexers.
//
// It adds four bits of one column and a carry-in from the compressor one
// column lower:  X1 + X2 + X3 + X4 + cin = sum + 2*(carry + cout).
// cout does not depend on cin, so a row of these compressors, each cin
// fed by the cout of the column below, has no carry ripple.
//
// Structure (all combinational):
//   XOR-XNOR(X1,X2) -> x12, x12n        XOR-XNOR(X3,X4) -> x34, x34n
//   cout  = x12 ? X3 : X1               (majority of X1, X2, X3)
//   p     = x34 ? x12n : x12            (X1^X2^X3^X4, a mux instead of a third XOR)
//   carry = p ? cin : X4
//   sum   = p ? ~cin : cin              (p ^ cin)
// The two XOR-XNOR cells and four multiplexers, and the cout and carry
// equations, follow the published compressor. The sum multiplexer taking
// cin and its complement, and the choice of x34 as the select of the
// middle multiplexer, are this design's reading of that structure.
//
// Ports: x[0] is X1 ... x[3] is X4.
module compressor_4_2 (
  input  logic [3:0] x,
  input  logic       cin,
  output logic       sum,
  output logic       carry,
  output logic       cout
);
  timeunit 1ns; timeprecision 1ps;

  logic x12, x12n, x34, x34n, p, cin_n;

  xor_xnor u_xx12 (.a(x[0]), .b(x[1]), .x(x12), .xn(x12n));
  xor_xnor u_xx34 (.a(x[2]), .b(x[3]), .x(x34), .xn(x34n));

  // x34n is the spare output of the second cell; the middle mux needs
  // only the true polarity as its select.
  mux2 u_mux_cout  (.sel(x12), .d0(x[0]), .d1(x[2]), .y(cout));
  mux2 u_mux_par   (.sel(x34), .d0(x12),  .d1(x12n), .y(p));
  mux2 u_mux_carry (.sel(p),   .d0(x[3]), .d1(cin),  .y(carry));

  always_comb cin_n = ~cin;
  mux2 u_mux_sum   (.sel(p),   .d0(cin),  .d1(cin_n), .y(sum));

  logic unused_x34n;
  always_comb unused_x34n = x34n;
endmodule
