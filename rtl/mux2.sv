// 2:1 multiplexer, the other primitive of the XOR-XNOR compressor.
// y follows d1 when sel is 1 and d0 when sel is 0. Combinational, no
// timing of its own. The compressor uses it where a select signal is
// ready before the data, so the data path sees only one multiplexer.
module mux2 (
  input  logic sel,
  input  logic d0,
  input  logic d1,
  output logic y
);
  timeunit 1ns; timeprecision 1ps;

  always_comb y = sel ? d1 : d0;
endmodule
