// MULT12O12 against the integer product: corner operands plus 50,000 random
// ones; only bits 23:12 of A*B are compared.
module mult12o12_tb;
  timeunit 1ns; timeprecision 1ps;
  logic [23:0] in_vec;
  logic [11:0] q;
  int checks = 0, failures = 0;

  mult12o12 dut (.in_vec(in_vec), .p_msb(q));

  task automatic check(input logic [11:0] a, input logic [11:0] b);
    logic [23:0] p;
    in_vec = {b, a};
    p = 24'(a) * 24'(b);
    #1;
    checks++;
    if (q !== p[23:12]) begin
      failures++;
      if (failures < 10) $display("FAIL %h*%h exp %h got %h", a, b, p[23:12], q);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(12'hFFF, 12'hFFF);
    check(12'h000, 12'hFFF);
    check(12'hFC0, 12'h03F);
    check(12'h03F, 12'hFC0);
    check(12'h800, 12'h800);
    for (int k = 0; k < 12; k++) check(12'hFFF, 12'(1 << k));
    for (int n = 0; n < 50000; n++) check(12'($urandom), 12'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
