// End-to-end test of the multiplier at its default width (8 bits): every
// one of the 65536 operand pairs, each product compared with the integer
// product a*b worked out in the testbench.
//
// It also counts how often each carry mechanism of the compressor
// network is exercised and fails if one never is:
//   - a 7:2 compressor passing a carry two columns up (cout1/cout2),
//   - a 4:2 compressor passing a carry one column up (cout),
//   - the eighth crosswise product of the middle column, which skips the
//     7:2 compressor and enters the 4:2 step directly,
//   - a 7:2 compressor with both of its carry inputs high.
module tb_urdhwa_multiplier;
  timeunit 1ns; timeprecision 1ps;

  localparam int W = 8;

  logic [W-1:0]   a, b;
  logic [2*W-1:0] p;
  int checks = 0, failures = 0;
  int n_cout72 = 0, n_cout42 = 0, n_eighth = 0, n_both_cin = 0;

  urdhwa_multiplier dut (.a(a), .b(b), .p(p));

  initial begin : watchdog
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int va = 0; va < (1 << W); va++) begin
      for (int vb = 0; vb < (1 << W); vb++) begin
        int unsigned want;
        a = W'(va);
        b = W'(vb);
        #1;
        want = va * vb;
        checks++;
        if (p != (2*W)'(want)) begin
          failures++;
          if (failures < 20) $display("FAIL %0d * %0d = %0d, got %0d", va, vb, want, p);
        end
        if (|{dut.co1, dut.co2}) n_cout72++;
        if (|dut.co) n_cout42++;
        if (dut.pp[W-1][7]) n_eighth++;
        if (|(dut.co1 & dut.co2)) n_both_cin++;
      end
    end
    $display("7:2 carries out: %0d, 4:2 carries out: %0d, eighth product: %0d, both 7:2 carries: %0d",
             n_cout72, n_cout42, n_eighth, n_both_cin);
    checks++;
    if (n_cout72 == 0) begin failures++; $display("FAIL no 7:2 carry out"); end
    checks++;
    if (n_cout42 == 0) begin failures++; $display("FAIL no 4:2 carry out"); end
    checks++;
    if (n_eighth == 0) begin failures++; $display("FAIL eighth product never set"); end
    checks++;
    if (n_both_cin == 0) begin failures++; $display("FAIL both 7:2 carries never set"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
