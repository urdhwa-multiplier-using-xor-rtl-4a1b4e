// Test of the multiplier at every other width it supports, 2 to 7 bits:
// one instance per width, each driven with all operand pairs and compared
// with the integer product. At these widths no column has an eighth
// product, so the 4:2 step only adds the 7:2 results of neighbouring
// columns; the 8-bit case is covered by tb_urdhwa_multiplier.
module tb_urdhwa_multiplier_widths;
  timeunit 1ns; timeprecision 1ps;

  int checks = 0, failures = 0;
  int done = 0;

  initial begin : watchdog
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar w = 2; w <= 7; w++) begin : g_w
    logic [w-1:0]   a, b;
    logic [2*w-1:0] p;

    urdhwa_multiplier #(.WIDTH(w)) dut (.a(a), .b(b), .p(p));

    initial begin
      for (int va = 0; va < (1 << w); va++) begin
        for (int vb = 0; vb < (1 << w); vb++) begin
          a = w'(va);
          b = w'(vb);
          #1;
          checks++;
          if (p != (2*w)'(va * vb)) begin
            failures++;
            if (failures < 20) $display("FAIL width %0d: %0d * %0d, got %0d", w, va, vb, p);
          end
        end
      end
      done++;
    end
  end

  initial begin
    wait (done == 6);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
