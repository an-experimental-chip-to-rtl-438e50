// Pseudo-random / exhaustive workload on the whole chip at its default
// parameters: the complete 2^24-vector test of the 24-input CUTs, which is
// also the N^2 exhaustive test of the 12-input MULT6SQ.
//
// The failure counters of all five CUT types are cleared by scanning in
// zeros. The source is seeded with alternating 1s and 0s and stepped at speed
// through all 2^24-1 nonzero LFSR states. The all-zero vector is then
// applied in direct mode, and one more clock counts its result. The RB
// circuits are stood in for by four identical copies of a fixed function.
// CPASSF and PPASSF must stay low on every clock, and DOUT23 must follow an
// independent model of the LFSR on every clock; this checks the whole state
// sequence, because the MSB stream of a shift register carries every state.
// Finally all five counter chains are scanned out:
//   - no failure is recorded, so a = c = 0 and every total is 0;
//   - both first-failure counters hold the number of counted clocks.
// The 24-bit LFSR counter has period 2^24-1, so a test this long wraps it.
// A count of N then reads like N - (2^24-1), and the bench checks exactly
// that state.
module test_chip_exh_tb;
  timeunit 1ns; timeprecision 1ps;

  localparam int unsigned PERIOD = (1 << 24) - 1;

  logic                  clk = 1'b0, reset = 1'b0, evse = 1'b0, pten = 1'b0, ptwin = 1'b0;
  logic                  dcent = 1'b0, atspeedt = 1'b1, maskf = 1'b1, srserf = 1'b1, srsi = 1'b0;
  logic                  fcse = 1'b0;
  logic [4:0]            evsi = '0, cutent = '1, fcsi = '0;
  logic [23:0]           din = '0;
  logic [1:0]            srcmode = 2'b00, srmode = 2'b00;
  logic [5:0]            srsel = '0;
  logic [2:0][3:0][11:0] rb_cut_out;
  logic                  cpout, dout23, srso, anyfullf, srctsto, parout;
  logic [4:0]            pswinout, evso, cpassf, ppassf, fcso;
  logic [2:0][23:0]      rb_cut_in;

  test_chip dut (.*);

  int checks = 0, failures = 0;
  int unsigned n_prand = 0, n_zero = 0, n_counted = 0, n_scan = 0;

  initial begin
    #400ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input bit ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // stand-in for the RB circuits: all four copies agree
  function automatic logic [11:0] rbf(input logic [23:0] v, input int k);
    logic [23:0] x;
    x = v ^ (v >> 5) ^ 24'(k * 24'h5A5A17);
    return x[11:0] ^ x[23:12];
  endfunction

  always_comb
    for (int k = 0; k < 3; k++)
      for (int c = 0; c < 4; c++) rb_cut_out[k][c] = rbf(rb_cut_in[k], k);

  function automatic logic [23:0] lfsr(input logic [23:0] s);
    return {s[22:0], s[23] ^ s[6] ^ s[1] ^ s[0]};
  endfunction

  // state of the 24-bit XNOR counter (x^24+x^7+x^2+x+1) after n counts from 0
  function automatic logic [23:0] l24(input int unsigned n);
    logic [23:0] s = '0;
    for (int unsigned i = 0; i < n % PERIOD; i++)
      s = {s[22:0], ~(s[23] ^ s[6] ^ s[1] ^ s[0])};
    return s;
  endfunction

  task automatic cyc();
    #1 clk = 1'b1;
    #5 clk = 1'b0;
    #4;
  endtask

  initial begin
    logic [23:0] s;
    logic [99:0] got [5];
    logic [99:0] exp;
    reset = 1'b1; #3 reset = 1'b0;

    // seed the source, then clear every counter with the source held
    srcmode = 2'b00; din = 24'hAAAAAA;
    cyc(); cyc();
    srcmode = 2'b11;
    fcse = 1'b1;
    repeat (100) cyc();
    fcse = 1'b0;
    s = 24'hAAAAAA;

    // all nonzero states at speed
    srcmode = 2'b10;
    for (int unsigned k = 0; k < PERIOD; k++) begin
      cyc(); n_counted++;
      s = lfsr(s);
      n_prand++;
      check("DOUT23 follows the LFSR", dout23 === s[23]);
      check("no failure flagged", cpassf === 5'b0 && ppassf === 5'b0);
    end
    check("LFSR back at the seed after 2^24-1 clocks", s === 24'hAAAAAA);

    // the all-zero vector in direct mode, then one clock to count its result
    srcmode = 2'b00; din = 24'h000000;
    cyc(); n_counted++; n_zero++;
    check("SRCTSTO low on the all-zero vector", srctsto === 1'b0);
    srcmode = 2'b11;
    cyc(); n_counted++;
    check("no failure flagged on the all-zero vector", cpassf === 5'b0 && ppassf === 5'b0);
    check("ANYFULLF high (no total counter full)", anyfullf === 1'b1);

    // read the counters: bit 99 (tot_only MSB) comes out first
    fcse = 1'b1;
    for (int i = 99; i >= 0; i--) begin
      for (int t = 0; t < 5; t++) got[t][i] = fcso[t];
      cyc();
    end
    fcse = 1'b0;
    n_scan++;
    // tot_only, tot_stab, first_stab, d, c, tot_samp, first_samp, b, a
    exp = {16'h0, 16'h0, l24(n_counted), 1'b0, 1'b0, 16'h0, l24(n_counted), 1'b0, 1'b0};
    for (int t = 0; t < 5; t++) begin
      check($sformatf("counter chain of CUT type %0d", t), got[t] === exp);
      if (got[t] !== exp) $display("  type %0d got %h exp %h", t, got[t], exp);
    end

    $display("mechanisms: prand=%0d zero=%0d counted=%0d scan=%0d", n_prand, n_zero, n_counted, n_scan);
    check("every nonzero state applied", n_prand == PERIOD);
    check("all-zero vector applied", n_zero == 1);
    check("counters read", n_scan == 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
