// CUT enables: walking-1 vectors with one CUT type enabled at a time (the
// chip's own input-line test), then random vectors and enables, against an
// independent model of the gating and of the 108-input OR.
module cut_enable_gate_tb;
  timeunit 1ns; timeprecision 1ps;
  logic [23:0]      vec;
  logic [4:0]       cuten;
  logic [11:0]      cut0_in;
  logic [3:0][23:0] cut_in;
  logic             or_out;
  int checks = 0, failures = 0;

  cut_enable_gate dut (.vec, .cuten, .cut0_in, .cut_in, .or_out);

  task automatic check;
    logic [11:0] e0;
    logic        eor;
    #1;
    for (int i = 0; i < 12; i++) e0[i] = vec[2*i] & cuten[0];
    eor = |e0;
    checks++;
    if (cut0_in !== e0) begin failures++; $display("FAIL cut0 vec=%h en=%b", vec, cuten); end
    for (int k = 1; k < 5; k++) begin
      logic [23:0] ek;
      ek = cuten[k] ? vec : 24'h0;
      eor |= |ek;
      checks++;
      if (cut_in[k-1] !== ek) begin failures++; $display("FAIL cut%0d vec=%h en=%b", k, vec, cuten); end
    end
    checks++;
    if (or_out !== eor) begin failures++; $display("FAIL or vec=%h en=%b", vec, cuten); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 5; k++)
      for (int b = 0; b < 24; b++) begin
        vec = 24'(1) << b; cuten = 5'(1) << k;
        check();
        // CUT 0 sees only even stages
        checks++;
        if (or_out !== (k != 0 || b % 2 == 0)) begin
          failures++; $display("FAIL walking 1: CUT %0d bit %0d", k, b);
        end
      end
    vec = 24'hFFFFFF; cuten = '0; check();
    for (int n = 0; n < 2000; n++) begin
      vec = 24'($urandom); cuten = 5'($urandom);
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
