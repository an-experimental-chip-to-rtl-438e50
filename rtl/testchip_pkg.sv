// Shared types and constants of the test evaluation chip.
//
// The chip applies one 24-bit vector per input clock to four copies of each of
// five combinational circuits-under-test (CUTs) and compares the copies'
// outputs. This package holds what several blocks share: the source-mode and
// signature-mode encodings (the pin encodings of SRCMODE and SRMODE), the CUT
// type numbering, and the step functions of the LFSRs.
//
// The data-source polynomial x^24+x^7+x^2+x+1 is the chip's own. The failure
// counters are LFSR counters too, but their polynomials are this design's
// choice: XNOR feedback, so that the all-zero state loaded by the scan chain is
// the count zero.
package testchip_pkg;

  localparam int unsigned DIN_W       = 24;  // data source width
  localparam int unsigned N_CUT_TYPES = 5;   // CUT 0 .. CUT 4
  localparam int unsigned N_COPIES    = 4;   // copies of each CUT type
  localparam int unsigned FIRST_W     = 24;  // first-failure counters
  localparam int unsigned TOTAL_W     = 16;  // total-failure counters

  // CUT type numbers on the enable and observation pins
  localparam int unsigned CUT_MULT6SQ   = 0;
  localparam int unsigned CUT_RB_ROBUST = 1;
  localparam int unsigned CUT_RB_SIMPLE = 2;
  localparam int unsigned CUT_RB_STD    = 3;
  localparam int unsigned CUT_MULT12O12 = 4;

  // SRCMODE(1:0)
  typedef enum logic [1:0] {
    SRC_DIRECT  = 2'b00,  // vectors straight from the tester
    SRC_SHIFTED = 2'b01,  // each vector applied shifted by one bit, then as is
    SRC_PRAND   = 2'b10,  // pseudo-random / exhaustive from the LFSR
    SRC_HOLD    = 2'b11   // not defined on the chip: register holds
  } src_mode_e;

  // SRMODE(1:0): number of segments x segment length of the signature register
  typedef enum logic [1:0] {
    SR_12X4 = 2'b00,
    SR_16X3 = 2'b01,
    SR_24X2 = 2'b10,
    SR_48X1 = 2'b11
  } sr_mode_e;

  // Feedback tap masks, bit t-1 set for each term x^t (Fibonacci form)
  localparam logic [23:0] POLY24 = 24'h800043;          // x^24+x^7+x^2+x+1
  localparam logic [15:0] POLY16 = 16'hD008;            // x^16+x^15+x^13+x^4+1
  localparam logic [11:0] POLY12 = 12'h829;             // x^12+x^6+x^4+x+1
  localparam logic [47:0] POLY48 = 48'hC000_0018_0000;  // x^48+x^47+x^21+x^20+1

  // One step of a 24-bit XNOR LFSR counter (period 2^24-1, starts at 0).
  function automatic logic [23:0] cnt24_next(input logic [23:0] s);
    return {s[22:0], ~(^(s & POLY24))};
  endfunction

  // One step of a 16-bit XNOR LFSR counter (period 2^16-1, starts at 0).
  function automatic logic [15:0] cnt16_next(input logic [15:0] s);
    return {s[14:0], ~(^(s & POLY16))};
  endfunction

  // Last state of the 16-bit counter before it returns to zero: 65534 counts.
  localparam logic [15:0] CNT16_FULL = 16'h8000;

endpackage
