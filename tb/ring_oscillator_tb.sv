// Ring oscillator model: held at 0 while disabled; while enabled, counts
// rising edges over a fixed time and checks the period.
module ring_oscillator_tb;
  timeunit 1ns; timeprecision 1ps;
  localparam real HP = 5.0;
  logic en = 1'b0, osc;
  int checks = 0, failures = 0, rises = 0;

  ring_oscillator #(.HALF_PERIOD_NS(HP)) dut (.en, .osc);

  always @(posedge osc) rises++;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200;
    checks++;
    if (osc !== 1'b0 || rises != 0) begin failures++; $display("FAIL oscillates while disabled"); end
    en = 1'b1;
    #1000;
    // 1000 ns at a 10 ns period: 100 rising edges (one either way for phase)
    checks++;
    if (rises < 99 || rises > 101) begin failures++; $display("FAIL %0d rising edges in 1 us", rises); end
    en = 1'b0;
    #20;
    rises = 0;
    #200;
    checks++;
    if (osc !== 1'b0 || rises != 0) begin failures++; $display("FAIL does not stop"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
