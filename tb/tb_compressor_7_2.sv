// Self-checking test of the 7:2 compressor over all 512 input patterns.
// It checks the counting identity
//   X1+...+X7 + cin1 + cin2 = sum + 2*carry + 4*(cout1 + cout2)
// and that sum is the parity of the nine inputs.
module tb_compressor_7_2;
  timeunit 1ns; timeprecision 1ps;

  logic [6:0] x;
  logic cin1, cin2, sum, carry, cout1, cout2;
  int checks = 0, failures = 0;

  compressor_7_2 dut (.x(x), .cin1(cin1), .cin2(cin2),
                      .sum(sum), .carry(carry), .cout1(cout1), .cout2(cout2));

  initial begin : watchdog
    #10us;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 512; v++) begin
      int ones, outv;
      {cin2, cin1, x} = 9'(v);
      #1;
      ones = $countones({cin2, cin1, x});
      outv = int'(sum) + 2 * int'(carry) + 4 * (int'(cout1) + int'(cout2));
      checks++;
      if (outv != ones) begin
        failures++;
        $display("FAIL count: x=%b cin1=%b cin2=%b -> %0d, want %0d", x, cin1, cin2, outv, ones);
      end
      checks++;
      if (sum != ^{cin2, cin1, x}) begin
        failures++;
        $display("FAIL sum parity: x=%b cin1=%b cin2=%b", x, cin1, cin2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
