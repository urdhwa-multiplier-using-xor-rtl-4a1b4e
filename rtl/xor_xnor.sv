// XOR-XNOR cell: the two-output exclusive-or stage at the head of the
// 4:2 compressor. It gives a^b and its complement together, so the
// multiplexers that follow can take either polarity as data or select
// without a separate inverter. Both outputs are purely combinational and
// settle together. The dual-output cell is the one labelled in the
// compressor diagram; how it is built at transistor level is left to the
// synthesis tool.
module xor_xnor (
  input  logic a,
  input  logic b,
  output logic x,   // a ^ b
  output logic xn   // ~(a ^ b)
);
  timeunit 1ns; timeprecision 1ps;

  always_comb begin
    x  = a ^ b;
    xn = ~(a ^ b);
  end
endmodule
