// Signature register: for each of the four MISR groupings and each of the
// four serial LFSR lengths (with several mux selections), scan a seed in,
// compress random responses, scan the signature out and compare it with an
// independent model; also checks that scan mode wins over both modes.
module signature_register_tb;
  import testchip_pkg::*;
  timeunit 1ns; timeprecision 1ps;
  logic        clk = 1'b0, srserf = 1'b1, srsi = 1'b0, srso;
  logic [5:0]  srsel = '0;
  sr_mode_e    srmode = SR_48X1;
  logic [47:0] resp = '0, sig;
  int checks = 0, failures = 0;

  signature_register dut (.clk, .resp, .srsel, .srmode, .srserf, .srsi, .srso, .sig);

  always #5 clk = ~clk;

  // taps as exponent lists, written independently of the RTL masks
  function automatic bit fb(input logic [47:0] s, input int base, input int n);
    int t12 [4] = '{12, 6, 4, 1};
    int t16 [4] = '{16, 15, 13, 4};
    int t24 [4] = '{24, 7, 2, 1};
    int t48 [4] = '{48, 47, 21, 20};
    bit f = 0;
    for (int k = 0; k < 4; k++) begin
      int e;
      e = (n == 12) ? t12[k] : (n == 16) ? t16[k] : (n == 24) ? t24[k] : t48[k];
      f ^= s[base + e - 1];
    end
    return f;
  endfunction

  function automatic logic [47:0] model_par(input logic [47:0] s, input logic [47:0] r, input int n);
    logic [47:0] x;
    for (int base = 0; base < 48; base += n) begin
      x[base] = fb(s, base, n) ^ r[base];
      for (int i = 1; i < n; i++) x[base + i] = s[base + i - 1] ^ r[base + i];
    end
    return x;
  endfunction

  function automatic logic [47:0] model_ser(input logic [47:0] s, input bit in, input int n);
    logic [47:0] x = s;
    x[0] = fb(s, 0, n) ^ in;
    for (int i = 1; i < n; i++) x[i] = s[i - 1];
    return x;
  endfunction

  task automatic scan_in(input logic [47:0] seed);
    @(negedge clk); srsel = 6'b111000;
    for (int i = 47; i >= 0; i--) begin srsi = seed[i]; @(negedge clk); end
  endtask

  task automatic scan_out_check(input string what, input logic [47:0] exp);
    logic [47:0] got;
    srsel = 6'b111101;
    for (int i = 47; i >= 0; i--) begin got[i] = srso; srsi = 1'b0; @(negedge clk); end
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h exp %h", what, got, exp); end
  endtask

  initial begin
    #20ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int sizes [4] = '{12, 16, 24, 48};
    for (int m = 0; m < 4; m++) begin
      // parallel
      logic [47:0] model;
      model = {$urandom, $urandom};
      scan_in(model);
      checks++;
      if (sig !== model) begin failures++; $display("FAIL seed load"); end
      srserf = 1'b1; srmode = sr_mode_e'(m); srsel = 6'd0;
      for (int v = 0; v < 300; v++) begin
        resp = {$urandom, $urandom};
        @(negedge clk);
        model = model_par(model, resp, sizes[m]);
      end
      scan_out_check($sformatf("parallel %0dx%0d", sizes[m], 48 / sizes[m]), model);
      // serial, three selections
      for (int q = 0; q < 3; q++) begin
        int sel;
        sel = (q == 0) ? 0 : (q == 1) ? 47 : $urandom % 48;
        model = {$urandom, $urandom};
        scan_in(model);
        srserf = 1'b0; srmode = sr_mode_e'(m); srsel = 6'(sel);
        for (int v = 0; v < 300; v++) begin
          resp = {$urandom, $urandom};
          @(negedge clk);
          model = model_ser(model, resp[sel], sizes[m]);
        end
        scan_out_check($sformatf("serial %0d bits, input %0d", sizes[m], sel), model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
