// Failure counters of one CUT type.
//
// Five LFSR counters record, for the sampling check and the stability check,
// when the first failure happened and how many failures there were:
//   first_samp / first_stab (24 bit): count every clock until the first
//     failure; the SR latch a (c) is set by that failure and stops the
//     counter, so the count is the number of passing vectors before the first
//     failing one, or the test length if none failed;
//   tot_samp (S), tot_stab (P), tot_only (P and not S) (16 bit): count the
//     failing vectors. When any of the three reaches its last state, all
//     three freeze, so their ratios stay correct; full reports this.
// LFSR counters are much smaller than binary ones; the tester converts the
// states back to numbers. All counters start from the all-zero state.
// Scan: with fcse high every bit shifts one place per clock along
//   fcsi -> a -> b -> first_samp[0..23] -> tot_samp[0..15]
//        -> c -> d -> first_stab[0..23] -> tot_stab[0..15]
//        -> tot_only[0..15] -> fcso   (100 bits).
// Loading all zeros starts a test: a = c = 0 enables the first-failure
// counters and every count is zero.
//
// Synchronous to clk (the master clock). Chip-defined: the five counters and
// widths, the SR-latch control, the freeze, LFSR counting and the scan order.
// Design choices: the counter polynomials, "maximum count" taken as the last
// state before the sequence wraps, and b, d as scan-only bits (they read 0
// after every test).
module failure_counters
  import testchip_pkg::*;
(
  input  logic clk,
  input  logic fcse,
  input  logic fcsi,
  input  logic samp,   // sampling failure of the vector counted at this edge
  input  logic stab,   // stability failure of the vector counted at this edge
  output logic fcso,
  output logic full
);

  typedef struct packed {
    logic [TOTAL_W-1:0] tot_only;
    logic [TOTAL_W-1:0] tot_stab;
    logic [FIRST_W-1:0] first_stab;
    logic               d;
    logic               c;
    logic [TOTAL_W-1:0] tot_samp;
    logic [FIRST_W-1:0] first_samp;
    logic               b;
    logic               a;
  } fc_chain_t;

  localparam int unsigned CHAIN_W = $bits(fc_chain_t);

  fc_chain_t r;
  logic      freeze;

  assign freeze = (r.tot_samp == CNT16_FULL) || (r.tot_stab == CNT16_FULL) ||
                  (r.tot_only == CNT16_FULL);
  assign full   = freeze;
  assign fcso   = r.tot_only[TOTAL_W-1];

  always_ff @(posedge clk) begin
    if (fcse) begin
      r <= fc_chain_t'({r[CHAIN_W-2:0], fcsi});
    end else begin
      if (!r.a && !samp) r.first_samp <= cnt24_next(r.first_samp);
      if (!r.c && !stab) r.first_stab <= cnt24_next(r.first_stab);
      if (samp) r.a <= 1'b1;
      if (stab) r.c <= 1'b1;
      if (!freeze) begin
        if (samp)          r.tot_samp <= cnt16_next(r.tot_samp);
        if (stab)          r.tot_stab <= cnt16_next(r.tot_stab);
        if (stab && !samp) r.tot_only <= cnt16_next(r.tot_only);
      end
    end
  end

endmodule
