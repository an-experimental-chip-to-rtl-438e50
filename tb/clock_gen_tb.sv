// Clock and window generator: for each clocking mode, drives a master clock
// and a delayed copy and checks the output clock and the checking period at
// points inside every phase of the cycle against the waveforms of the three
// modes, plus the external-window override.
module clock_gen_tb;
  timeunit 1ns; timeprecision 1ps;
  logic clk = 1'b0, clk_dly = 1'b0, atspeed, dcen, pten = 1'b0, ptwin = 1'b0;
  logic out_clk, cp;
  int checks = 0, failures = 0;

  clock_gen dut (.clk, .clk_dly, .atspeed, .dcen, .pten, .ptwin, .out_clk, .cp);

  task automatic expect2(input string what, input logic e_clk, input logic e_cp);
    checks++;
    if (out_clk !== e_clk || cp !== e_cp) begin
      failures++;
      $display("FAIL %s: out_clk=%b cp=%b, expected %b %b", what, out_clk, cp, e_clk, e_cp);
    end
  endtask

  // one master cycle: clk high at 0..40, delayed copy high at 30..70
  task automatic cycle(input string mode);
    clk = 1'b1; #10;                 // t=10: clk 1, dly 0
    if (mode == "speed") expect2("speed high", 1, 0);
    if (mode == "pulse") expect2("pulse high", 0, 0);
    if (mode == "self")  expect2("self before offset", 0, 0);
    #20 clk_dly = 1'b1; #5;          // t=35: clk 1, dly 1
    if (mode == "self")  expect2("self after offset", 1, 1);
    #5 clk = 1'b0; #10;              // t=50: clk 0, dly 1
    if (mode == "speed") expect2("speed low", 0, 0);
    if (mode == "pulse") expect2("pulse low", 1, 1);
    if (mode == "self")  expect2("self clk low", 1, 1);
    #20 clk_dly = 1'b0; #10;         // t=80: both low
    if (mode == "self")  expect2("self both low", 0, 1);
    #20;
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    atspeed = 1'b1; dcen = 1'b0; repeat (3) cycle("speed");
    atspeed = 1'b1; dcen = 1'b1; repeat (2) cycle("speed");
    atspeed = 1'b0; dcen = 1'b1; repeat (3) cycle("pulse");
    atspeed = 1'b0; dcen = 1'b0; repeat (3) cycle("self");
    // external window
    pten = 1'b1;
    for (int n = 0; n < 8; n++) begin
      ptwin = 1'(n); clk = 1'(n >> 1); #1;
      checks++;
      if (cp !== ptwin) begin failures++; $display("FAIL ptwin override"); end
    end
    // at speed disables post-sample checking even with the external window
    atspeed = 1'b1; ptwin = 1'b1; #1;
    checks++;
    if (cp !== 1'b0) begin failures++; $display("FAIL at-speed window not disabled"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
