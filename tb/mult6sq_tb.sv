// Exhaustive check of MULT6SQ: for all 4096 inputs, the six MSBs of
// (upper six bits of A*B) squared.
module mult6sq_tb;
  timeunit 1ns; timeprecision 1ps;
  logic [11:0] in_vec;
  logic [5:0]  q;
  int checks = 0, failures = 0;

  mult6sq dut (.in_vec(in_vec), .q_msb(q));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4096; v++) begin
      int a, b, p, s, e;
      in_vec = 12'(v);
      a = v % 64; b = v / 64;
      p = a * b; s = p / 64; e = (s * s) / 64;
      #1;
      checks++;
      if (q !== 6'(e)) begin
        failures++;
        if (failures < 10) $display("FAIL in=%h exp=%0d got=%0d", v, e, q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
