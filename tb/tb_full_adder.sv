// Self-checking test of the full adder: all eight input triples, with
// the expected sum and carry worked out as integer addition.
module tb_full_adder;
  timeunit 1ns; timeprecision 1ps;

  logic a, b, c, s, co;
  int checks = 0, failures = 0;

  full_adder dut (.a(a), .b(b), .c(c), .s(s), .co(co));

  initial begin : watchdog
    #1us;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      logic [1:0] total;
      {a, b, c} = 3'(v);
      #1;
      total = 2'(a) + 2'(b) + 2'(c);
      checks++;
      if ({co, s} != total) begin
        failures++;
        $display("FAIL a=%0b b=%0b c=%0b got co=%0b s=%0b", a, b, c, co, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
