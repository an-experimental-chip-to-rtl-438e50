// CUT enables and the source-test OR gate.
//
// The applied vector goes to every CUT type through a bank of AND gates, one
// per CUT type, enabled by CUTENT(i); a disabled CUT type sees all zeros on
// its inputs, so only the enabled CUT type draws switching current (used for
// IDDQ and for localising failures). CUT 0 (MULT6SQ, 12 inputs) takes every
// second stage of the register (stages 0, 2, ..., 22), which turns the 24-bit
// pseudo-random sequence into an N^2 exhaustive test of a 12-input circuit.
// All 108 gated lines (12 + 4 x 24) are ORed onto one output (SRCTSTO): with a
// walking 1 in the register and one CUT type enabled at a time, every CUT
// input line can be checked without going through a CUT.
//
// Purely combinational. Chip-defined: the gating, the every-second-stage tap
// and the 108-input OR. Design choice: CUT 0 uses the even stages in every
// source mode.
module cut_enable_gate
  import testchip_pkg::*;
(
  input  logic [DIN_W-1:0]            vec,
  input  logic [N_CUT_TYPES-1:0]      cuten,
  output logic [DIN_W/2-1:0]          cut0_in,
  output logic [N_CUT_TYPES-2:0][DIN_W-1:0] cut_in,  // index k is CUT k+1
  output logic                        or_out
);

  logic [DIN_W/2-1:0] even;

  always_comb begin
    for (int i = 0; i < DIN_W/2; i++) even[i] = vec[2*i];
    cut0_in = even & {(DIN_W/2){cuten[0]}};
    for (int k = 0; k < N_CUT_TYPES-1; k++)
      cut_in[k] = vec & {DIN_W{cuten[k+1]}};
    or_out = |cut0_in | |cut_in;
  end

endmodule
