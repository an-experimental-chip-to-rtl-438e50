// Data source: direct loads, shifted vector pairs (order, shift and masking,
// RESET of the pair phase), and the pseudo-random sequence against an
// independent model of x^24+x^7+x^2+x+1 over one full period of 2^24-1
// clocks: the seed comes back only at the end, and every second stage sees
// every ordered pair of 12-bit vectors except (0,0) exactly once (the N^2
// exhaustive test of the 12-input CUT).
module data_source_tb;
  import testchip_pkg::*;
  timeunit 1ns; timeprecision 1ps;

  logic        clk = 1'b0, rst = 1'b0, maskf = 1'b1;
  src_mode_e   mode = SRC_DIRECT;
  logic [23:0] din = '0, vec;
  logic        vec_mask, msb;
  int checks = 0, failures = 0;
  localparam int PERIOD = (1 << 24) - 1;

  data_source dut (.clk, .rst, .mode, .din, .maskf, .vec, .vec_mask, .msb);

  always #5 clk = ~clk;

  initial begin
    #400ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input string what, input logic [23:0] got, input logic [23:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %h exp %h", what, got, exp);
    end
  endtask

  function automatic logic [23:0] lfsr_model(input logic [23:0] s);
    logic fb;
    fb = s[23] ^ s[6] ^ s[1] ^ s[0];
    return {s[22:0], fb};
  endfunction

  initial begin
    logic [23:0] v, model;
    // ---- direct mode
    rst = 1'b1; #1 rst = 1'b0;
    mode = SRC_DIRECT;
    for (int n = 0; n < 200; n++) begin
      v = 24'($urandom);
      @(negedge clk); din = v; maskf = 1'($urandom);
      @(posedge clk); #1;
      expect_eq("direct vec", vec, v);
      expect_eq("direct mask", 24'(vec_mask), 24'(!maskf));
      expect_eq("direct msb", 24'(msb), 24'(v[23]));
    end
    // ---- shifted vector pairs
    @(negedge clk); mode = SRC_SHIFTED; rst = 1'b1; #1 rst = 1'b0;
    for (int n = 0; n < 100; n++) begin
      v = 24'($urandom);
      din = v; maskf = 1'($urandom);
      @(posedge clk); #1;
      expect_eq("pair first vec", vec, {1'b0, v[23:1]});
      expect_eq("pair first masked", 24'(vec_mask), 24'(1));
      @(posedge clk); #1;
      expect_eq("pair second vec", vec, v);
      expect_eq("pair second mask", 24'(vec_mask), 24'(!maskf));
      @(negedge clk);
    end
    // RESET in the middle of a pair restarts with the shifted half
    din = 24'hA5A5A5;
    @(posedge clk); #1;
    rst = 1'b1; #1 rst = 1'b0;
    expect_eq("reset mask", 24'(vec_mask), 24'(1));
    @(posedge clk); #1;
    expect_eq("after reset shifted", vec, {1'b0, din[23:1]});
    // ---- pseudo-random: seed by a direct load of alternating 1s and 0s
    @(negedge clk); mode = SRC_DIRECT; din = 24'hAAAAAA; maskf = 1'b1;
    @(negedge clk); mode = SRC_PRAND;
    model = 24'hAAAAAA;
    begin
      bit seen [4096][4096];
      int pairs = 0;
      logic [11:0] prev_even, even;
      for (int i = 0; i < 12; i++) prev_even[i] = model[2*i];
      for (int n = 0; n < PERIOD; n++) begin
        @(posedge clk); #1;
        model = lfsr_model(model);
        if (n < 20000 || n % 1000 == 0) expect_eq("prand", vec, model);
        for (int i = 0; i < 12; i++) even[i] = vec[2*i];
        if (!seen[prev_even][even]) begin seen[prev_even][even] = 1'b1; pairs++; end
        prev_even = even;
        if (vec == 24'hAAAAAA && n != PERIOD - 1) begin
          failures++;
          $display("FAIL sequence repeated after %0d steps", n + 1);
        end
      end
      expect_eq("prand back at the seed after 2^24-1 steps", vec, 24'hAAAAAA);
      // a maximal-length shift sequence gives each ordered pair of
      // even-stage vectors once, except (0,0)
      checks++;
      if (pairs != PERIOD || seen[0][0]) begin
        failures++;
        $display("FAIL even-stage pairs: %0d distinct of %0d", pairs, PERIOD);
      end
    end
    // the all-zero state is never reached and a hold mode keeps the value
    @(negedge clk); mode = SRC_HOLD; v = vec;
    repeat (3) @(posedge clk); #1;
    expect_eq("hold", vec, v);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
