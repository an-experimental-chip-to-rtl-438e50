// Stability checker: no error outside the window; a rise, a fall or a glitch
// of D inside the window raises ERROR and holds it to the end of the window;
// a steady D inside the window gives no error; closing the window resets.
// Checked per bit against an independent event model.
module stability_checker_tb;
  timeunit 1ns; timeprecision 1ps;
  localparam int W = 4;
  logic [W-1:0] d = '0, error;
  logic         cp = 1'b0;
  logic [W-1:0] seen0, seen1;   // model: values D took inside the window
  int checks = 0, failures = 0;

  stability_checker #(.WIDTH(W)) dut (.d, .cp, .error);

  task automatic model_update;
    if (!cp) begin seen0 = ~d; seen1 = d; end
    else begin seen0 |= ~d; seen1 |= d; end
  endtask

  task automatic check(input string what);
    #1;
    checks++;
    if (error !== (seen0 & seen1)) begin
      failures++;
      $display("FAIL %s: d=%b cp=%b error=%b exp=%b", what, d, cp, error, seen0 & seen1);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    model_update(); check("init");
    // changes outside the window are ignored
    d = 4'b1010; model_update(); check("change outside");
    d = 4'b0101; model_update(); check("change outside 2");
    // steady window
    cp = 1'b1; model_update(); check("window open");
    #10 check("steady window");
    cp = 1'b0; model_update(); check("close");
    // rise in bit 0, fall in bit 2
    cp = 1'b1; model_update();
    d = 4'b0010; model_update(); check("rise/fall in window");
    checks++;
    if (error !== 4'b0111) begin failures++; $display("FAIL expected 0111 got %b", error); end
    // held until the window closes even if D returns
    d = 4'b0101; model_update(); check("held");
    cp = 1'b0; model_update(); check("reset on close");
    checks++;
    if (error !== '0) begin failures++; $display("FAIL not reset"); end
    // random sequences
    for (int n = 0; n < 3000; n++) begin
      if ($urandom % 4 == 0) cp = ~cp; else d = W'($urandom);
      model_update();
      check("random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
