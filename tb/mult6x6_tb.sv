// Exhaustive check of the 6x6 shift-and-add array multiplier: all 4096
// operand pairs against the integer product.
module mult6x6_tb;
  timeunit 1ns; timeprecision 1ps;
  logic [5:0] a, b;
  logic [11:0] p;
  int checks = 0, failures = 0;

  mult6x6 dut (.a(a), .b(b), .p(p));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 64; i++)
      for (int j = 0; j < 64; j++) begin
        a = 6'(i); b = 6'(j);
        #1;
        checks++;
        if (p !== 12'(i * j)) begin
          failures++;
          if (failures < 10) $display("FAIL %0d*%0d = %0d, got %0d", i, j, i * j, p);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
