// Test evaluation chip: a test vehicle that applies many kinds of test to
// five combinational circuits-under-test (CUTs), four copies of each, and
// checks the copies against each other on chip.
//
// Data path: one 24-bit data source (direct tester vectors, shifted vector
// pairs, or an LFSR that runs the exhaustive / N^2 exhaustive test) drives
// every CUT type through per-type enable gates. Per CUT type:
//   CUT 0 MULT6SQ   (12 in, 6 out)  built here
//   CUT 1 RB_ROBUST (24 in, 12 out) outside: rb_cut_in[0] / rb_cut_out[0]
//   CUT 2 RB_SIMPLE (24 in, 12 out) outside: rb_cut_in[1] / rb_cut_out[1]
//   CUT 3 RB_STD    (24 in, 12 out) outside: rb_cut_in[2] / rb_cut_out[2]
//   CUT 4 MULT12O12 (24 in, 12 out) built here
// The three RB circuits are slices of a proprietary controller whose logic
// function is not available, so their ports are brought out; everything
// around them (enables, windows, observers, counters) is here.
// Each CUT type has its own output clock / window generator and delay line
// (the self-timed window follows the delay of that CUT), a response observer
// (sample register, copy-1 comparators, stability checkers, scan chain) and a
// failure-counter block. The four MULT12O12 copies also feed the
// reconfigurable signature register.
// Clocking (ATSPEEDT, DCENT): at speed, pulse (external two-pattern) or
// self-timed (internal delay line). The input register is always clocked by
// CLK; counters and signature register count on the rising edge of CLK.
// Observability pins: DOUT23 (LFSR MSB, or the ring oscillator when
// SRSEL = 111111), SRCTSTO (OR of all gated CUT inputs), PAROUT (NAND tree
// over the input pins), CPOUT (clock reference).
//
// Follows the chip: the block diagram, the CUT numbering, the pin list and
// encodings. Design choices: one delay line per CUT type with the CUT's
// nominal delay, the NAND tree pin order, and all choices listed in the
// blocks' own headers. The CrossCheck test-point array is vendor logic and is
// not included.
module test_chip
  import testchip_pkg::*;
#(
  parameter real MULT_DELAY_NS       = 30.0,
  parameter real RB_ROBUST_DELAY_NS  = 8.2,
  parameter real RB_SIMPLE_DELAY_NS  = 8.2,
  parameter real RB_STD_DELAY_NS     = 8.3,
  parameter real RING_HALF_PERIOD_NS = 5.0
) (
  input  logic                    clk,
  input  logic                    reset,
  input  logic                    evse,
  input  logic [4:0]              evsi,
  input  logic                    pten,
  input  logic                    ptwin,
  input  logic                    dcent,
  input  logic                    atspeedt,
  input  logic                    maskf,
  input  logic [23:0]             din,
  input  logic [1:0]              srcmode,
  input  logic [4:0]              cutent,
  input  logic [5:0]              srsel,
  input  logic [1:0]              srmode,
  input  logic                    srserf,
  input  logic                    srsi,
  input  logic [4:0]              fcsi,
  input  logic                    fcse,
  input  logic [2:0][3:0][11:0]   rb_cut_out,
  output logic                    cpout,
  output logic                    dout23,
  output logic                    srso,
  output logic [4:0]              pswinout,
  output logic [4:0]              evso,
  output logic [4:0]              cpassf,
  output logic [4:0]              ppassf,
  output logic [4:0]              fcso,
  output logic                    anyfullf,
  output logic                    srctsto,
  output logic                    parout,
  output logic [2:0][23:0]        rb_cut_in
);

  // ---------------------------------------------------------------- source
  logic [23:0]      vec;
  logic             vec_mask, lfsr_msb;
  logic [11:0]      cut0_in;
  logic [3:0][23:0] cut_in;

  data_source u_src (
    .clk     (clk),
    .rst     (reset),
    .mode    (src_mode_e'(srcmode)),
    .din     (din),
    .maskf   (maskf),
    .vec     (vec),
    .vec_mask(vec_mask),
    .msb     (lfsr_msb)
  );

  cut_enable_gate u_en (
    .vec    (vec),
    .cuten  (cutent),
    .cut0_in(cut0_in),
    .cut_in (cut_in),
    .or_out (srctsto)
  );

  assign rb_cut_in = cut_in[2:0];

  // ------------------------------------------------------------------ CUTs
  logic [3:0][5:0]  c0_out;
  logic [3:0][11:0] c4_out;

  for (genvar c = 0; c < 4; c++) begin : g_copy
    mult6sq   u_cut0 (.in_vec(cut0_in),   .q_msb(c0_out[c]));
    mult12o12 u_cut4 (.in_vec(cut_in[3]), .p_msb(c4_out[c]));
  end

  // ------------------------------------------- clocks, windows, observers
  logic [4:0] clk_dly, out_clk, cp, cnt_samp, cnt_stab, full;
  logic [3:0][11:0] c4_q;

  for (genvar t = 0; t < 5; t++) begin : g_type
    localparam real DLY = (t == 1) ? RB_ROBUST_DELAY_NS :
                          (t == 2) ? RB_SIMPLE_DELAY_NS :
                          (t == 3) ? RB_STD_DELAY_NS : MULT_DELAY_NS;

    delay_line #(.DELAY_NS(DLY)) u_dly (.in_sig(clk), .out_sig(clk_dly[t]));

    clock_gen u_ck (
      .clk    (clk),
      .clk_dly(clk_dly[t]),
      .atspeed(atspeedt),
      .dcen   (dcent),
      .pten   (pten),
      .ptwin  (ptwin),
      .out_clk(out_clk[t]),
      .cp     (cp[t])
    );

    if (t == 0) begin : g_obs
      logic [3:0][5:0] q_unused;
      response_observer #(.W(6)) u_obs (
        .out_clk(out_clk[t]), .clk(clk), .cp(cp[t]), .evse(evse), .evsi(evsi[t]),
        .cut_out(c0_out), .mask_in(vec_mask), .samp_q(q_unused), .evso(evso[t]),
        .samp_err(cpassf[t]), .stab_err(ppassf[t]), .cnt_samp(cnt_samp[t]), .cnt_stab(cnt_stab[t])
      );
    end else if (t == 4) begin : g_obs
      response_observer #(.W(12)) u_obs (
        .out_clk(out_clk[t]), .clk(clk), .cp(cp[t]), .evse(evse), .evsi(evsi[t]),
        .cut_out(c4_out), .mask_in(vec_mask), .samp_q(c4_q), .evso(evso[t]),
        .samp_err(cpassf[t]), .stab_err(ppassf[t]), .cnt_samp(cnt_samp[t]), .cnt_stab(cnt_stab[t])
      );
    end else begin : g_obs
      logic [3:0][11:0] q_unused;
      response_observer #(.W(12)) u_obs (
        .out_clk(out_clk[t]), .clk(clk), .cp(cp[t]), .evse(evse), .evsi(evsi[t]),
        .cut_out(rb_cut_out[t-1]), .mask_in(vec_mask), .samp_q(q_unused), .evso(evso[t]),
        .samp_err(cpassf[t]), .stab_err(ppassf[t]), .cnt_samp(cnt_samp[t]), .cnt_stab(cnt_stab[t])
      );
    end

    failure_counters u_fc (
      .clk (clk),
      .fcse(fcse),
      .fcsi(fcsi[t]),
      .samp(cnt_samp[t]),
      .stab(cnt_stab[t]),
      .fcso(fcso[t]),
      .full(full[t])
    );
  end

  assign pswinout = cp;
  assign anyfullf = ~|full;

  // ------------------------------------------------- signature register
  logic [47:0] sig_unused;

  signature_register u_sr (
    .clk   (clk),
    .resp  (c4_q),
    .srsel (srsel),
    .srmode(sr_mode_e'(srmode)),
    .srserf(srserf),
    .srsi  (srsi),
    .srso  (srso),
    .sig   (sig_unused)
  );

  // ------------------------------------------------ observability pins
  logic ring_en, ring_osc;

  assign ring_en = &srsel;

  ring_oscillator #(.HALF_PERIOD_NS(RING_HALF_PERIOD_NS)) u_ring (.en(ring_en), .osc(ring_osc));

  assign dout23 = ring_en ? ring_osc : lfsr_msb;
  assign cpout  = clk;

  nand_tree #(.N(59)) u_par (
    .in_vec({reset, evse, evsi, pten, ptwin, dcent, atspeedt, maskf, din, srcmode,
             cutent, srsel, srmode, srserf, srsi, fcsi, fcse}),
    .out   (parout)
  );

endmodule
