// Signature-analysis workload on the whole chip at its default parameters.
//
// Runs the pseudo-random MULT12O12 test sets of the signature-analysis
// experiment, at speed, from the alternating 1s-and-0s seed:
//   - the four parallel groupings (one 48-bit, two 24-bit, three 16-bit and
//     four 12-bit MISRs), 64k vectors each, reading 10 intermediate
//     signatures in the 48-bit and 4 x 12-bit runs and the final signature in
//     every run;
//   - the four serial LFSR lengths (48, 24, 16, 12), 64k vectors on each of
//     the 48 output bits in turn (3,072k vectors per length),
// 12.5M vectors in all: the complete signature-analysis test.
// Intermediate signatures are read without disturbing the test: the source
// is held, the register is switched to scan mode and its 48 bits are rotated
// once round (SRSO fed back into SRSI) while they are read.
//
// The bench keeps a clock-accurate model of the three registers involved
// (input register, MULT12O12 sample register of the four copies, signature
// register), with the feedback taps written out per length, and compares
// every signature read. It counts each mode and each mechanism and counts a
// failure for any that never happened.
module test_chip_sig_tb;
  timeunit 1ns; timeprecision 1ps;

  localparam int RUN = 64 * 1024;

  logic                  clk = 1'b0, reset = 1'b0, evse = 1'b0, pten = 1'b0, ptwin = 1'b0;
  logic                  dcent = 1'b0, atspeedt = 1'b1, maskf = 1'b1, srserf = 1'b1, srsi = 1'b0;
  logic                  fcse = 1'b0;
  logic [4:0]            evsi = '0, cutent = '1, fcsi = '0;
  logic [23:0]           din = '0;
  logic [1:0]            srcmode = 2'b00, srmode = 2'b00;
  logic [5:0]            srsel = '0;
  logic [2:0][3:0][11:0] rb_cut_out = '0;
  logic                  cpout, dout23, srso, anyfullf, srctsto, parout;
  logic [4:0]            pswinout, evso, cpassf, ppassf, fcso;
  logic [2:0][23:0]      rb_cut_in;

  test_chip dut (.*);

  int checks = 0, failures = 0;
  int n_par [4] = '{default: 0};
  int n_ser [4] = '{default: 0};
  int n_inter = 0, n_hold = 0, n_vec = 0;

  initial begin
    #300ms;
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

  // ------------------------------------------------------------- model
  logic [23:0] m_vec;
  logic [47:0] m_samp, m_sig;

  function automatic logic [23:0] lfsr(input logic [23:0] s);
    return {s[22:0], s[23] ^ s[6] ^ s[1] ^ s[0]};
  endfunction

  // the four copies agree; copy c drives inputs 12c .. 12c+11
  function automatic logic [47:0] resp_of(input logic [23:0] v);
    logic [23:0] p;
    p = 24'(v[11:0]) * 24'(v[23:12]);
    return {4{p[23:12]}};
  endfunction

  // feedback of an n-stage segment whose stages are s[b .. b+n-1]:
  // x^12+x^6+x^4+x+1, x^16+x^15+x^13+x^4+1, x^24+x^7+x^2+x+1,
  // x^48+x^47+x^21+x^20+1
  function automatic logic fb(input logic [47:0] s, input int b, input int n);
    case (n)
      12:      return s[b+11] ^ s[b+5]  ^ s[b+3] ^ s[b];
      16:      return s[b+15] ^ s[b+14] ^ s[b+12] ^ s[b+3];
      24:      return s[b+23] ^ s[b+6]  ^ s[b+1] ^ s[b];
      default: return s[b+47] ^ s[b+46] ^ s[b+20] ^ s[b+19];
    endcase
  endfunction

  function automatic int len_of(input logic [1:0] m);
    case (m)
      2'b00:   return 12;
      2'b01:   return 16;
      2'b10:   return 24;
      default: return 48;
    endcase
  endfunction

  function automatic logic [47:0] sig_next(input logic [47:0] s, input logic [47:0] r);
    logic [47:0] x;
    int n;
    n = len_of(srmode);
    x = s;
    if (srsel[5:3] == 3'b111) return {s[46:0], srsi};
    if (srserf) begin
      for (int b = 0; b < 48; b += n) begin
        x[b] = fb(s, b, n) ^ r[b];
        for (int i = 1; i < n; i++) x[b+i] = s[b+i-1] ^ r[b+i];
      end
    end else begin
      x[0] = fb(s, 0, n) ^ (srsel < 48 ? r[srsel] : 1'b0);
      for (int i = 1; i < n; i++) x[i] = s[i-1];
    end
    return x;
  endfunction

  // one clock: pins are set 1 ns before the rising edge; the model takes the
  // same edge with the values the registers held before it
  task automatic edge1();
    logic [23:0] v;
    #1;
    v = m_vec;
    m_sig  = sig_next(m_sig, m_samp);
    m_samp = resp_of(v);
    case (srcmode)
      2'b00:   m_vec = din;
      2'b10:   m_vec = lfsr(v);
      default: m_vec = v;
    endcase
    clk = 1'b1; #5;
    clk = 1'b0; #4;
  endtask

  // read the signature without changing it: hold the source, rotate once
  task automatic read_sig(input string what);
    logic [47:0] got, exp;
    logic [1:0]  keep_src;
    logic [5:0]  keep_sel;
    keep_src = srcmode; keep_sel = srsel;
    exp = m_sig;
    srcmode = 2'b11; srsel = 6'b111000;
    for (int i = 47; i >= 0; i--) begin
      got[i] = srso;
      srsi   = srso;
      edge1();
    end
    n_hold++;
    check(what, got === exp);
    if (got !== exp) $display("  %s: got %h exp %h", what, got, exp);
    check("signature unchanged by the read", m_sig === exp);
    srcmode = keep_src; srsel = keep_sel; srsi = 1'b0;
  endtask

  // seed the source with 1010..., fill the sample register, clear the
  // signature register
  task automatic start_run();
    srcmode = 2'b00; din = 24'hAAAAAA;
    edge1(); edge1();
    srcmode = 2'b11; srsel = 6'b111000; srsi = 1'b0;
    repeat (48) edge1();
    check("model in step after seeding", m_vec === 24'hAAAAAA && m_sig === '0);
  endtask

  task automatic run(input int n, input int inter, input string what);
    srcmode = 2'b10;
    for (int k = 1; k <= n; k++) begin
      edge1();
      n_vec++;
      check("DOUT23 follows the source MSB", dout23 === m_vec[23]);
      if (inter > 0 && k % (n / inter) == 0 && k != n) begin
        read_sig($sformatf("%s intermediate signature", what));
        n_inter++;
      end
    end
    read_sig($sformatf("%s final signature", what));
  endtask

  initial begin
    m_vec = '0; m_samp = '0; m_sig = '0;
    reset = 1'b1; #3 reset = 1'b0;

    // ---- parallel: 48x1 and 12x4 with 10 intermediate signatures, 24x2, 16x3
    srserf = 1'b1;
    foreach (n_par[m]) begin
      logic [1:0] md;
      md = (m == 0) ? 2'b11 : (m == 1) ? 2'b00 : (m == 2) ? 2'b10 : 2'b01;
      srmode = md;
      start_run();
      srsel = '0;
      run(RUN, (md == 2'b11 || md == 2'b00) ? 10 : 0,
          $sformatf("%0d-bit MISR", len_of(md)));
      n_par[m]++;
    end

    // ---- serial: each length on every output in turn
    srserf = 1'b0;
    foreach (n_ser[m]) begin
      srmode = 2'(3 - m);          // 48, 24, 16, 12 stages
      for (int j = 0; j < 48; j++) begin
        start_run();
        srsel = 6'(j);
        run(RUN, 0, $sformatf("%0d-bit serial LFSR on output %0d", len_of(srmode), j));
        n_ser[m]++;
      end
    end

    $display("mechanisms: par48=%0d par12=%0d par24=%0d par16=%0d ser48=%0d ser24=%0d ser16=%0d ser12=%0d inter=%0d hold=%0d vectors=%0d",
             n_par[0], n_par[1], n_par[2], n_par[3], n_ser[0], n_ser[1], n_ser[2], n_ser[3],
             n_inter, n_hold, n_vec);
    foreach (n_par[m]) check("parallel mode ran", n_par[m] > 0);
    foreach (n_ser[m]) check("serial length ran on all 48 outputs", n_ser[m] == 48);
    check("intermediate signatures read", n_inter == 20);
    check("held source during reads", n_hold > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
