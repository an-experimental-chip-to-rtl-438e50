// Response observer (W = 12), driven with pulse-mode timing: the input clock
// clk rises, the CUT outputs settle, the output clock (inverted clk) samples
// them on the falling edge, and the checking period is the low phase of clk.
// Checks: latched values, copy-1 comparison on every copy and bit, masking,
// stability errors (window open, steady outputs; a late change), the error
// reaching the counter input exactly at the clk edge that closes the window,
// and the 48-bit evaluator scan chain.
module response_observer_tb;
  timeunit 1ns; timeprecision 1ps;
  localparam int W = 12;
  logic clk = 1'b0, out_clk, cp, evse = 1'b0, evsi = 1'b0, mask_in = 1'b0;
  logic [3:0][W-1:0] cut_out = '0, samp_q;
  logic evso, samp_err, stab_err, cnt_samp, cnt_stab;
  int checks = 0, failures = 0;

  assign out_clk = ~clk;
  assign cp      = ~clk;

  response_observer #(.W(W)) dut (.out_clk, .clk, .cp, .evse, .evsi, .cut_out, .mask_in,
    .samp_q, .evso, .samp_err, .stab_err, .cnt_samp, .cnt_stab);

  task automatic expect1(input string what, input logic got, input logic exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %b exp %b", what, got, exp); end
  endtask

  // One test cycle: new response at the clk rise, sampled at the fall; an
  // optional late change during the window; returns just before the next rise.
  task automatic cycle(input logic [3:0][W-1:0] resp, input logic mask, input bit late);
    clk = 1'b1; #1;
    cut_out = resp; mask_in = mask;
    #19 clk = 1'b0; #5;
    if (late) begin cut_out[2][3] = ~cut_out[2][3]; #1; end
    #14;
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0][W-1:0] r;
    logic              exp_err;
    cycle('0, 1'b0, 0);
    // equal copies, then one copy/bit wrong at a time
    for (int n = 0; n < 200; n++) begin
      logic [W-1:0] v;
      int c, b;
      v = W'($urandom);
      r = {v, v, v, v};
      c = n % 4; b = (n / 4) % W;
      exp_err = (n % 3 == 0);
      if (exp_err) r[c][b] = ~r[c][b];
      cycle(r, 1'b0, 0);
      expect1("latched", samp_q === r, 1'b1);
      expect1("sampling error", samp_err, exp_err);
      expect1("to counter", cnt_samp, exp_err);
      expect1("no stability error", cnt_stab, 1'b0);
    end
    // mask
    r = '0; r[1][0] = 1'b1;
    cycle(r, 1'b1, 0);
    expect1("masked sampling error still on CPASSF", samp_err, 1'b1);
    expect1("masked not counted", cnt_samp, 1'b0);
    // late change inside the window
    r = '0;
    cycle(r, 1'b0, 0);
    cycle(r, 1'b0, 1);
    expect1("stability error", stab_err, 1'b1);
    expect1("stability error to counter", cnt_stab, 1'b1);
    expect1("sampled values agree", samp_err, 1'b0);
    // the counting edge reads it, then it clears
    clk = 1'b1; #1;
    expect1("window closed", stab_err, 1'b0);
    expect1("cleared after counting edge", cnt_stab, 1'b0);
    #19 clk = 1'b0; #20;
    // masked late change
    cycle('0, 1'b1, 1);
    expect1("masked stability", cnt_stab, 1'b0);
    // scan chain: shift 48 random bits in, then 48 more, compare evso
    begin
      logic [4*W-1:0] pat;
      pat = {$urandom, $urandom};
      evse = 1'b1;
      clk = 1'b1;
      for (int i = 0; i < 4 * W; i++) begin
        evsi = pat[i];
        #10 clk = 1'b0; #10 clk = 1'b1;
      end
      expect1("scan load", samp_q === (4*W)'({<<{pat}}), 1'b1);
      for (int i = 0; i < 4 * W; i++) begin
        expect1("scan out", evso, pat[i]);
        evsi = 1'b0;
        #10 clk = 1'b0; #10 clk = 1'b1;
      end
      evse = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
