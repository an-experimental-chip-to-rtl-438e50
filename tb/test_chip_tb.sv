// End-to-end test of the whole chip at its default parameters.
//
// The three RB circuits are not part of the chip RTL; this bench stands in
// for their four copies with an arbitrary 24-to-12 function (their real
// function is not public) and can give single copies a defect:
//   - a slow copy of RB_STD (output settles 50 ns after the input clock, i.e.
//     after sampling, inside the window): a sampling and a stability failure
//     whenever its output should change;
//   - a glitching copy of RB_SIMPLE (correct in time, then a 5 ns pulse on
//     bit 0 inside the window on vectors with bit 0 set): stability only;
//   - a stuck copy of RB_ROBUST (bit 0 inverted): a sampling failure on every
//     vector, used to fill a total counter and check the freeze.
// Phases, each counted as a mechanism that must occur at least once:
//   source test    walking 1s through every CUT enable onto SRCTSTO
//   at speed       pseudo-random vectors from the LFSR (DOUT23 against a
//                  model), MULT12O12 into the 4 x 12 MISR; signature scanned
//                  out and compared with a model fed by model products;
//                  MULT12O12 and MULT6SQ sample registers scanned out through
//                  the evaluator chain and compared with integer products
//   pulse mode     defects on, random vectors and MASKF; fail counters of all
//                  five CUT types scanned out and compared with a model
//   self-timed     the same through the delay lines
//   windows        PSWINOUT closed time: CLK high time in pulse mode, the
//                  delay-line delay in self-timed mode
//   PTEN/PTWIN     window forced open while the inputs change: stability
//                  errors on every CUT type whose outputs move
//   shifted pairs  RESET, pairs checked on the RB inputs, first half masked
//   freeze         stuck copy until a total counter is full (ANYFULLF low)
//   ring osc       DOUT23 oscillates when SRSEL = 111111
//   NAND tree      PAROUT against a model of the chain
module test_chip_tb;
  import testchip_pkg::*;
  timeunit 1ns; timeprecision 1ps;

  logic clk = 1'b0, reset = 1'b0, evse = 1'b0, pten = 1'b0, ptwin = 1'b0;
  logic dcent = 1'b0, atspeedt = 1'b1, maskf = 1'b1, srserf = 1'b1, srsi = 1'b0, fcse = 1'b0;
  logic [4:0]  evsi = '0, cutent = '1, fcsi = '0;
  logic [23:0] din = '0;
  logic [1:0]  srcmode = 2'b00, srmode = 2'b00;
  logic [5:0]  srsel = 6'd0;
  logic [2:0][3:0][11:0] rb_cut_out;
  logic cpout, dout23, srso, anyfullf, srctsto, parout;
  logic [4:0] pswinout, evso, cpassf, ppassf, fcso;
  logic [2:0][23:0] rb_cut_in;

  int checks = 0, failures = 0;

  // mechanism counters
  int n_srctst = 0, n_prand = 0, n_sig = 0, n_evscan = 0, n_samp_fail = 0, n_stab_fail = 0,
      n_stab_only = 0, n_masked = 0, n_pulse = 0, n_self = 0, n_atspeed = 0, n_shift = 0,
      n_freeze = 0, n_ring = 0, n_par = 0, n_reset = 0, n_dly = 0, n_pten = 0;

  // closed time of each window (PSWINOUT low pulse), measured every cycle
  realtime win_fall [5], win_w [5];
  for (genvar t = 0; t < 5; t++) begin : g_win
    always @(negedge pswinout[t]) win_fall[t] = $realtime;
    always @(posedge pswinout[t]) win_w[t] = $realtime - win_fall[t];
  end

  function automatic realtime abs_diff(input realtime a, input realtime b);
    return (a > b) ? a - b : b - a;
  endfunction

  test_chip dut (.*);

  // ------------------------------------------------------------ RB copies
  bit slow_en = 0, glitch_en = 0, stuck_en = 0;

  function automatic logic [11:0] rbf(input logic [23:0] v, input int k);
    logic [23:0] x;
    x = v ^ (v >> 7) ^ 24'(k * 24'h35A3C1);
    return x[11:0] ^ x[23:12] ^ {x[5:0], x[11:6]};
  endfunction

  // each copy: a fast path (2 ns), a slow path (50 ns) and a glitch bit
  logic [11:0] rb_fast [3][4];
  logic [11:0] rb_slow [3][4];
  logic        rb_glt  [3][4];

  initial
    for (int k = 0; k < 3; k++)
      for (int c = 0; c < 4; c++) begin
        rb_fast[k][c] = '0; rb_slow[k][c] = '0; rb_glt[k][c] = 1'b0;
      end

  always_comb
    for (int k = 0; k < 3; k++)
      for (int c = 0; c < 4; c++)
        rb_cut_out[k][c] = ((slow_en && k == 2 && c == 1) ? rb_slow[k][c] : rb_fast[k][c])
                           ^ {11'b0, rb_glt[k][c]};

  for (genvar k = 0; k < 3; k++) begin : g_rb
    for (genvar c = 0; c < 4; c++) begin : g_copy
      always @(rb_cut_in[k]) begin
        logic [11:0] v;
        v = rbf(rb_cut_in[k], k);
        if (k == 0 && c == 2 && stuck_en) v[0] = ~v[0];
        rb_fast[k][c] <= #2 v;
        if (k == 2 && c == 1) rb_slow[k][c] <= #50 v;
        if (k == 1 && c == 3 && glitch_en && rb_cut_in[k][0])
          fork begin #60 rb_glt[k][c] = 1'b1; #5 rb_glt[k][c] = 1'b0; end join_none
      end
    end
  end

  // ------------------------------------------------------------- helpers
  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 30) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // one master clock cycle: high time th, low time tl; inputs change while low
  task automatic cyc(input realtime th, input realtime tl);
    clk = 1'b1; #(th);
    clk = 1'b0; #(tl);
  endtask

  function automatic logic [23:0] lfsr(input logic [23:0] s);
    return {s[22:0], s[23] ^ s[6] ^ s[1] ^ s[0]};
  endfunction

  function automatic logic [11:0] m12(input logic [23:0] v);
    logic [23:0] p;
    p = 24'(v[11:0]) * 24'(v[23:12]);
    return p[23:12];
  endfunction

  function automatic logic [5:0] msq(input logic [23:0] v);
    int a, b, s, e;
    a = 0; b = 0;
    for (int i = 0; i < 6; i++) begin
      a |= int'(v[2*i]) << i;
      b |= int'(v[2*(i+6)]) << i;
    end
    s = (a * b) / 64; e = (s * s) / 64;
    return 6'(e);
  endfunction

  // 4 x 12 MISR, taps x^12+x^6+x^4+x+1 per segment
  function automatic logic [47:0] misr12(input logic [47:0] s, input logic [47:0] r);
    logic [47:0] x;
    for (int b = 0; b < 48; b += 12) begin
      x[b] = s[b+11] ^ s[b+5] ^ s[b+3] ^ s[b] ^ r[b];
      for (int i = 1; i < 12; i++) x[b+i] = s[b+i-1] ^ r[b+i];
    end
    return x;
  endfunction

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

  typedef struct {
    int unsigned first_s, first_p, ns, np, nps;
    bit          a, c;
  } fc_model_t;

  function automatic logic [99:0] chain_of(input fc_model_t m);
    return {l16(m.nps), l16(m.np), l24(m.first_p), 1'b0, 1'(m.c), l16(m.ns), l24(m.first_s), 1'b0, 1'(m.a)};
  endfunction

  // ---------------------------------------------------- counter test run
  // Loads zeros into all counters, applies n vectors in the current clock
  // mode with the defects on, unloads the counters and compares.
  task automatic counter_run(input string mode, input int n, input realtime th, input realtime tl);
    fc_model_t   m [5];
    logic [99:0] got [5];
    logic [23:0] v, prev;
    logic [11:0] std_prev, std_now;
    srcmode = 2'b00; cutent = '1; maskf = 1'b0; din = '0;
    fcse = 1'b1;
    repeat (101) cyc(th, tl);
    fcse = 1'b0;
    foreach (m[t]) begin m[t] = '{default: 0}; end
    prev = '0;
    slow_en = 1; glitch_en = 1;
    for (int k = 0; k <= n; k++) begin
      bit masked, fs, fp;
      v = (k == n) ? 24'h0 : 24'($urandom);
      masked = (k == n) || ($urandom % 8 == 0);
      din = v; maskf = ~masked;
      // what the bench expects for vector k (counted one edge later)
      std_now  = rbf(v, 2);
      std_prev = rbf(prev, 2);
      for (int t = 0; t < 5; t++) begin
        fs = 0; fp = 0;
        if (t == 3 && std_now != std_prev) begin fs = 1; fp = 1; end
        if (t == 2 && v[0]) fp = 1;
        if ((fs || fp) && masked) n_masked++;
        if (masked) begin fs = 0; fp = 0; end
        if (fs) begin n_samp_fail++; end
        if (fp) begin n_stab_fail++; if (!fs) n_stab_only++; end
        if (fs && !m[t].a) begin m[t].first_s = k + 1; m[t].a = 1; end
        if (fp && !m[t].c) begin m[t].first_p = k + 1; m[t].c = 1; end
        m[t].ns += fs; m[t].np += fp; m[t].nps += (fp && !fs);
      end
      prev = v;
      cyc(th, tl);
    end
    // result of the last (masked) vector is counted here
    cyc(th, tl);
    slow_en = 0; glitch_en = 0;
    for (int t = 0; t < 5; t++) begin
      if (!m[t].a) m[t].first_s = n + 2;
      if (!m[t].c) m[t].first_p = n + 2;
    end
    fcse = 1'b1;
    for (int i = 99; i >= 0; i--) begin
      for (int t = 0; t < 5; t++) got[t][i] = fcso[t];
      cyc(th, tl);
    end
    fcse = 1'b0;
    for (int t = 0; t < 5; t++) begin
      check($sformatf("%s counters of CUT type %0d", mode, t), got[t] === chain_of(m[t]));
      if (got[t] !== chain_of(m[t]))
        $display("  got %h\n  exp %h", got[t], chain_of(m[t]));
    end
  endtask

  // ------------------------------------------------------------- watchdog
  initial begin
    #50ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ring oscillator edges on DOUT23
  int ring_edges = 0;
  always @(posedge dout23) if (&srsel) ring_edges++;

  function automatic logic [47:0] f4(input logic [23:0] v);
    return {m12(v), m12(v), m12(v), m12(v)};
  endfunction

  function automatic logic par_model;
    logic [58:0] p;
    logic t;
    p = {reset, evse, evsi, pten, ptwin, dcent, atspeedt, maskf, din, srcmode,
         cutent, srsel, srmode, srserf, srsi, fcsi, fcse};
    t = !p[0];
    for (int i = 1; i < 59; i++) t = !(t && p[i]);
    return t;
  endfunction

  initial begin
    logic [23:0] s, sp;
    logic [47:0] sig, c4, got48;
    logic [23:0] got24;
    // -------------------------------------------------- RESET, source test
    reset = 1'b1; #5 reset = 1'b0; n_reset++;
    atspeedt = 1'b1; srcmode = 2'b00;
    for (int t = 0; t < 5; t++)
      for (int b = 0; b < 24; b++) begin
        din = 24'(1) << b; cutent = 5'(1) << t;
        cyc(5, 5);
        check("SRCTSTO walking 1", srctsto === (t != 0 || b % 2 == 0));
        n_srctst++;
      end
    cutent = '1;
    check("PAROUT", parout === par_model()); n_par++;

    // -------------------------------------------- at speed, pseudo-random
    din = 24'hAAAAAA;
    cyc(5, 5);                       // seed: alternating 1s and 0s
    s = 24'hAAAAAA; sp = 24'h800000;
    srcmode = 2'b10;
    // clear the signature register by scanning zeros (the LFSR keeps running)
    srsel = 6'b111000; srsi = 1'b0;
    for (int i = 0; i < 48; i++) begin cyc(5, 5); sp = s; s = lfsr(s); end
    srsel = 6'd0; srserf = 1'b1; srmode = 2'b00;
    // at speed one edge loads vector s' = lfsr(s), samples f(s) and feeds the
    // signature register with the samples of the vector before
    sig = '0; c4 = f4(sp);
    for (int e = 0; e < 3000; e++) begin
      check("DOUT23 = LFSR MSB", dout23 === s[23]);
      n_prand++;
      sig = misr12(sig, c4);
      c4 = f4(s);
      cyc(5, 5); sp = s; s = lfsr(s);
      n_atspeed++;
      check("no sampling failure at speed", cpassf === 5'b0 && ppassf === 5'b0);
    end
    srsel = 6'b111000;
    for (int i = 47; i >= 0; i--) begin got48[i] = srso; cyc(5, 5); sp = s; s = lfsr(s); end
    srsel = 6'd0;
    check("MULT12O12 4x12 MISR signature", got48 === sig);
    if (got48 !== sig) $display("  sig got %h exp %h", got48, sig);
    n_sig++;
    // evaluator scan of the MULT12O12 and MULT6SQ sample registers: they
    // hold the response to vector sp
    srcmode = 2'b11;                 // hold the source while scanning
    evse = 1'b1;
    for (int j = 0; j < 48; j++) begin
      got48[47-j] = evso[4];
      if (j < 24) got24[23-j] = evso[0];
      cyc(5, 5);
    end
    evse = 1'b0;
    check("MULT12O12 samples via evaluator scan", got48 === f4(sp));
    check("MULT6SQ samples via evaluator scan", got24 === {msq(sp), msq(sp), msq(sp), msq(sp)});
    n_evscan++;

    // --------------------------------------------------- pulse clocking
    atspeedt = 1'b0; dcent = 1'b1;
    counter_run("pulse", 400, 40, 60);
    n_pulse++;
    check("PAROUT", parout === par_model()); n_par++;

    // ---------------------------------------------- self-timed clocking
    atspeedt = 1'b0; dcent = 1'b0;
    counter_run("self-timed", 400, 40, 60);
    n_self++;

    // ---------------------------- window widths: delay-line measurement
    // pulse mode: the window is the low time of CLK; self-timed: it is
    // closed from the CLK rise until the delayed clock rises, so its closed
    // time on PSWINOUT is the delay of the type's delay line
    srcmode = 2'b11;
    dcent = 1'b1;
    foreach (win_w[t]) win_w[t] = -1.0;
    repeat (3) cyc(40, 60);
    foreach (win_w[t]) check($sformatf("pulse-mode window of type %0d", t), abs_diff(win_w[t], 40.0) < 0.01);
    dcent = 1'b0;
    foreach (win_w[t]) win_w[t] = -1.0;
    repeat (3) cyc(40, 60);
    foreach (win_w[t]) begin
      check($sformatf("delay line of type %0d measured on PSWINOUT", t),
            abs_diff(win_w[t], (t == 0 || t == 4) ? 30.0 : (t == 3) ? 8.3 : 8.2) < 0.01);
      if (abs_diff(win_w[t], (t == 0 || t == 4) ? 30.0 : (t == 3) ? 8.3 : 8.2) >= 0.01)
        $display("  type %0d closed for %0t ns", t, win_w[t]);
    end
    n_dly++;

    // ------------------------- stability checkers under PTEN / PTWIN
    // the tester holds the window open while the inputs change, so every
    // CUT type whose outputs move must report a stability error; closing
    // the window clears the checkers
    begin
      logic [23:0] v0, v1;
      srcmode = 2'b00; v0 = 24'h123456; din = v0;
      cyc(40, 60); cyc(40, 60);
      do v1 = 24'($urandom);
      while (m12(v1) == m12(v0) || msq(v1) == msq(v0) || rbf(v1, 0) == rbf(v0, 0));
      pten = 1'b1; ptwin = 1'b0;
      #1 check("PTWIN low drives every window low", pswinout === 5'b00000);
      ptwin = 1'b1;
      #1 check("PTWIN high drives every window high", pswinout === 5'b11111);
      check("no stability error while the outputs are still", ppassf === 5'b00000);
      din = v1;
      cyc(40, 60);
      check("stability errors with the window forced open", ppassf[0] === 1'b1 && ppassf[1] === 1'b1 && ppassf[4] === 1'b1);
      ptwin = 1'b0;
      #1 check("closing the window clears the checkers", ppassf === 5'b00000);
      pten = 1'b0;
      n_pten++;
    end

    // ------------------------------------------------ shifted vector pairs
    atspeedt = 1'b1; srcmode = 2'b01; maskf = 1'b1;
    reset = 1'b1; #1 reset = 1'b0; n_reset++;
    for (int k = 0; k < 50; k++) begin
      logic [23:0] v;
      v = 24'($urandom);
      din = v;
      cyc(5, 5);
      check("shifted half", rb_cut_in[0] === {1'b0, v[23:1]});
      cyc(5, 5);
      check("vector half", rb_cut_in[0] === v);
      n_shift++;
    end

    // -------------------------------------------- total counter freeze
    srcmode = 2'b00; maskf = 1'b1; stuck_en = 1;
    fcse = 1'b1; repeat (101) cyc(5, 5); fcse = 1'b0;
    for (int k = 0; k < 65534 + 20; k++) begin
      din = 24'($urandom);
      if (k == 65000) check("ANYFULLF high before full", anyfullf === 1'b1);
      cyc(5, 5);
    end
    check("ANYFULLF low when a total counter is full", anyfullf === 1'b0);
    if (anyfullf === 1'b0) n_freeze++;
    stuck_en = 0;

    // --------------------------------------------------- ring oscillator
    srsel = 6'b111111;
    ring_edges = 0;
    #1000;
    check("ring oscillator runs", ring_edges > 20);
    if (ring_edges > 20) n_ring++;
    srsel = 6'd0;
    check("PAROUT", parout === par_model()); n_par++;

    // --------------------------------------------------------- summary
    $display("mechanisms: srctst=%0d prand=%0d atspeed=%0d sig=%0d evscan=%0d pulse=%0d self=%0d",
             n_srctst, n_prand, n_atspeed, n_sig, n_evscan, n_pulse, n_self);
    $display("            samp_fail=%0d stab_fail=%0d stab_only=%0d masked=%0d shift=%0d freeze=%0d ring=%0d par=%0d reset=%0d dly=%0d pten=%0d",
             n_samp_fail, n_stab_fail, n_stab_only, n_masked, n_shift, n_freeze, n_ring, n_par, n_reset, n_dly, n_pten);
    check("mechanism: source test", n_srctst > 0);
    check("mechanism: pseudo-random", n_prand > 0);
    check("mechanism: at-speed clocking", n_atspeed > 0);
    check("mechanism: signature", n_sig > 0);
    check("mechanism: evaluator scan", n_evscan > 0);
    check("mechanism: pulse clocking", n_pulse > 0);
    check("mechanism: self-timed clocking", n_self > 0);
    check("mechanism: sampling failure", n_samp_fail > 0);
    check("mechanism: stability failure", n_stab_fail > 0);
    check("mechanism: stability-only failure", n_stab_only > 0);
    check("mechanism: masked failure", n_masked > 0);
    check("mechanism: shifted pairs", n_shift > 0);
    check("mechanism: counter freeze", n_freeze > 0);
    check("mechanism: ring oscillator", n_ring > 0);
    check("mechanism: NAND tree", n_par > 0);
    check("mechanism: reset", n_reset > 0);
    check("mechanism: delay-line measurement", n_dly > 0);
    check("mechanism: PTEN window test", n_pten > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
