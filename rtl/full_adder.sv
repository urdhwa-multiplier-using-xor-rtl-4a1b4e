// One-bit full adder: a + b + c = s + 2*co, with s the parity of the
// three inputs and co their majority. Combinational. The 7:2 compressor
// uses two of them to fold the weight-2 carries of its 4:2 compressors.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic s,
  output logic co
);
  timeunit 1ns; timeprecision 1ps;

  always_comb begin
    s  = a ^ b ^ c;
    co = (a & b) | (a & c) | (b & c);
  end
endmodule
