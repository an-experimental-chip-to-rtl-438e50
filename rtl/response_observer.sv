// Response observation circuit of one CUT type (four copies of a W-output
// CUT).
//
// Sampling: every CUT output is latched by the output clock into a scannable
// register. Copy 1's latched word is XORed with copies 2, 3 and 4 and the
// 3 x W comparator bits are ORed into samp_err (CPASSF): 1 means some copy
// disagreed with copy 1 on the sampled vector. No fault-free response is
// needed, so arbitrarily long tests can be checked on chip.
// Stability: each raw CUT output also feeds a stability checker watching the
// checking period cp; their ERRORs are ORed into stab_err (PPASSF).
// Scan: with evse high the 4 x W register bits form one shift chain
// evsi -> copy 1 bit 0 ... copy 4 bit W-1 -> evso, clocked by the output
// clock, for initialising and testing the support circuitry.
//
// To the failure counters (clocked by clk, the master clock) go
//   cnt_samp = samp_err of the sampled vector, unless that vector is masked;
//   cnt_stab = a stability error seen in the window that ends at this clk
//              edge, unless masked.
// The mask arrives with the vector (mask_in, registered at the input clock)
// and is latched by the output clock next to the response, so the counters
// see it aligned with the result it qualifies. The window closes at the same
// clk edge at which the counters count, so the window's error is caught in a
// flop that ERROR sets at once and that the counting edge clears after it has
// been read.
//
// Chip-defined: latching, the copy-1 comparison, the OR trees, checkers on the
// raw outputs and the scan chain. Design choices: the scan order, the mask
// pipeline and the error-capture flop.
module response_observer #(
  parameter int unsigned W = 12
) (
  input  logic              out_clk,
  input  logic              clk,
  input  logic              cp,
  input  logic              evse,
  input  logic              evsi,
  input  logic [3:0][W-1:0] cut_out,
  input  logic              mask_in,
  output logic [3:0][W-1:0] samp_q,
  output logic              evso,
  output logic              samp_err,
  output logic              stab_err,
  output logic              cnt_samp,
  output logic              cnt_stab
);

  logic             mask_q;
  logic [4*W-1:0]   sc_err;
  logic             stab_seen;
  logic [4*W-1:0]   samp_flat;

  assign samp_flat = samp_q;

  // Output (sampling) register, scannable
  always_ff @(posedge out_clk) begin
    if (evse) samp_q <= {samp_flat[4*W-2:0], evsi};
    else      samp_q <= cut_out;
    mask_q <= mask_in;
  end

  assign evso = samp_q[3][W-1];

  // Copy 1 against copies 2..4
  always_comb begin
    samp_err = 1'b0;
    for (int c = 1; c < 4; c++) samp_err |= |(samp_q[0] ^ samp_q[c]);
  end

  stability_checker #(.WIDTH(4*W)) u_sc (
    .d    (cut_out),
    .cp   (cp),
    .error(sc_err)
  );

  assign stab_err = |sc_err;

  // Hold a window's stability error until the counting edge has read it
  always_ff @(posedge clk or posedge stab_err) begin
    if (stab_err) stab_seen <= 1'b1;
    else          stab_seen <= 1'b0;
  end

  assign cnt_samp = samp_err  & ~mask_q;
  assign cnt_stab = stab_seen & ~mask_q;

endmodule
