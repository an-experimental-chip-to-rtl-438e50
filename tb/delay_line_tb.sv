// Delay line model: every edge of a clock with several pulse widths must
// reappear DELAY_NS later and not before.
module delay_line_tb;
  timeunit 1ns; timeprecision 1ps;
  localparam real D = 30.0;
  logic in_sig = 1'b0, out_sig;
  int checks = 0, failures = 0;

  delay_line #(.DELAY_NS(D)) dut (.in_sig, .out_sig);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #50;
    for (int n = 0; n < 20; n++) begin
      realtime w;
      logic    v;
      w = 40.0 + 10.0 * (n % 4);
      v = ~in_sig;
      in_sig = v;
      #(D - 1.0);
      checks++;
      if (out_sig === v) begin failures++; $display("FAIL edge %0d too early", n); end
      #2.0;
      checks++;
      if (out_sig !== v) begin failures++; $display("FAIL edge %0d missing", n); end
      #(w - D - 1.0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
