// One-bit half adder: s = a ^ b, co = a & b, so a + b = s + 2*co.
// Combinational. Used once in each 7:2 compressor to add the sums of its
// two 4:2 compressors. Its function is the textbook one; nothing about it
// is specific to this design.
module half_adder (
  input  logic a,
  input  logic b,
  output logic s,
  output logic co
);
  timeunit 1ns; timeprecision 1ps;

  always_comb begin
    s  = a ^ b;
    co = a & b;
  end
endmodule
