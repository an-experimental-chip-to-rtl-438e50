// Failure counters: scan in zeros to start, apply failure sequences, scan the
// 100-bit chain out and compare every field with an independent model (binary
// counts converted to LFSR states by stepping a separately written LFSR).
// Covers: no failures (first-failure count = test length), first failures at
// chosen vectors, the S / P / P-not-S totals, and the freeze of all three
// totals when one reaches its last state, with the full flag.
module failure_counters_tb;
  timeunit 1ns; timeprecision 1ps;
  logic clk = 1'b0, fcse = 1'b0, fcsi = 1'b0, samp = 1'b0, stab = 1'b0;
  logic fcso, full;
  int checks = 0, failures = 0;

  failure_counters dut (.clk, .fcse, .fcsi, .samp, .stab, .fcso, .full);

  always #5 clk = ~clk;

  function automatic logic [23:0] l24(input int unsigned n);
    logic [23:0] s = '0;
    for (int unsigned i = 0; i < n; i++) s = {s[22:0], ~(s[23] ^ s[6] ^ s[1] ^ s[0])};
    return s;
  endfunction
  function automatic logic [15:0] l16(input int unsigned n);
    logic [15:0] s = '0;
    for (int unsigned i = 0; i < n; i++) s = {s[14:0], ~(s[15] ^ s[14] ^ s[12] ^ s[3])};
    return s;
  endfunction

  task automatic load_zeros;
    @(negedge clk); fcse = 1'b1; fcsi = 1'b0;
    repeat (100) @(negedge clk);
    fcse = 1'b0;
  endtask

  // scan the chain out; out[i] is the i-th bit to appear on fcso
  task automatic unload(output logic [99:0] out);
    @(negedge clk); fcse = 1'b1; fcsi = 1'b0;
    for (int i = 0; i < 100; i++) begin
      out[i] = fcso;
      @(negedge clk);
    end
    fcse = 1'b0;
  endtask

  task automatic compare(input string what, input int unsigned first_s, input int unsigned first_p,
                         input bit a, input bit c, input int unsigned ns, input int unsigned np,
                         input int unsigned nps);
    logic [99:0] got, exp;
    logic [99:0] chain;   // chain[0] = a (nearest fcsi) ... chain[99] = last bit
    unload(got);
    chain = {l16(nps), l16(np), l24(first_p), 1'b0, c, l16(ns), l24(first_s), 1'b0, a};
    for (int i = 0; i < 100; i++) exp[i] = chain[99 - i];
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s\n got %h\n exp %h", what, got, exp);
    end
  endtask

  initial begin
    #20ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // 1. no failures: first-failure counts equal the test length
    load_zeros();
    repeat (777) @(negedge clk);
    compare("no failures", 778, 778, 0, 0, 0, 0, 0);
    // 2. random failures
    for (int t = 0; t < 4; t++) begin
      int unsigned len, fs, fp, ns, np, nps;
      bit sa, sc;
      len = 300 + $urandom % 700;
      fs = len; fp = len; ns = 0; np = 0; nps = 0; sa = 0; sc = 0;
      load_zeros();
      for (int unsigned v = 0; v < len; v++) begin
        samp = ($urandom % 9 == 0) && (v > 20 * t);
        stab = ($urandom % 7 == 0) && (v > 10);
        if (samp && !sa) begin fs = v; sa = 1; end
        if (stab && !sc) begin fp = v; sc = 1; end
        ns += samp; np += stab; nps += (stab && !samp);
        @(negedge clk);
      end
      samp = 1'b0; stab = 1'b0;
      // the clock edge that starts the unload counts nothing more
      if (!sa) fs = len + 1;
      if (!sc) fp = len + 1;
      compare($sformatf("random run %0d", t), fs, fp, sa, sc, ns, np, nps);
    end
    // 3. freeze: sampling failures on every vector until full
    load_zeros();
    samp = 1'b1;
    repeat (65534) @(negedge clk);
    checks++;
    if (full !== 1'b1) begin failures++; $display("FAIL not full after 65534"); end
    stab = 1'b1;   // frozen: no further counting of any total
    repeat (50) @(negedge clk);
    samp = 1'b0; stab = 1'b0;
    compare("frozen", 0, 65534, 1, 1, 65534, 0, 0);
    checks++;
    if (full !== 1'b0) begin failures++; $display("FAIL full not cleared by reload"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
