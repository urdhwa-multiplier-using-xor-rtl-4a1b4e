// Self-checking test of the 4:2 compressor over all 32 input patterns.
// For each one it checks the counting identity
//   X1+X2+X3+X4+cin = sum + 2*(carry + cout),
// and each output against its defining equation: sum is the parity of
// all five inputs, cout the majority of X1..X3 (so it never depends on
// cin), and carry is cin when X1^X2^X3^X4 is 1 and X4 otherwise.
module tb_compressor_4_2;
  timeunit 1ns; timeprecision 1ps;

  logic [3:0] x;
  logic cin, sum, carry, cout;
  int checks = 0, failures = 0;

  compressor_4_2 dut (.x(x), .cin(cin), .sum(sum), .carry(carry), .cout(cout));

  initial begin : watchdog
    #1us;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: x=%b cin=%b -> sum=%b carry=%b cout=%b", what, x, cin, sum, carry, cout);
    end
  endtask

  initial begin
    for (int v = 0; v < 32; v++) begin
      int ones, outv;
      bit p, maj3;
      {cin, x} = 5'(v);
      #1;
      ones = int'(x[0]) + int'(x[1]) + int'(x[2]) + int'(x[3]) + int'(cin);
      outv = int'(sum) + 2 * (int'(carry) + int'(cout));
      p    = x[0] ^ x[1] ^ x[2] ^ x[3];
      maj3 = (x[0] & x[1]) | (x[0] & x[2]) | (x[1] & x[2]);
      check(outv == ones, "count");
      check(sum == (p ^ cin), "sum");
      check(cout == maj3, "cout");
      check(carry == (p ? cin : x[3]), "carry");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
