// Output clock and checking-period (post-sample window) generator of one CUT
// type.
//
// The input register is always clocked by the master clock CLK. The output
// (sampling) clock and the window in which the stability checkers watch the
// CUT outputs depend on the clocking mode:
//   at speed  (atspeed=1)       : output clock = CLK, one vector per cycle;
//                                 window held low (no post-sample checking).
//   pulse     (atspeed=0,dcen=1): output clock = inverted CLK, so the CUT is
//                                 sampled on the falling edge of CLK; the
//                                 high time of CLK is the test time T_C and
//                                 the window is open while CLK is low.
//   self-timed(atspeed=0,dcen=0): output clock = CLK through the delay line;
//                                 the window closes at the input clock edge
//                                 and opens at the delayed edge, i.e. it is
//                                 low only while CLK is high and the delayed
//                                 clock is still low.
// With pten=1 the external ptwin replaces the window (support-circuit test).
//
// Combinational. Chip-defined: the three modes, their pins and the waveforms.
// Design choice: the clock and window multiplexers are plain gates; a real
// implementation would need glitch-free switching between modes.
module clock_gen (
  input  logic clk,
  input  logic clk_dly,
  input  logic atspeed,
  input  logic dcen,
  input  logic pten,
  input  logic ptwin,
  output logic out_clk,
  output logic cp
);

  logic cp_int;

  always_comb begin
    if (atspeed) begin
      out_clk = clk;
      cp_int  = 1'b0;
    end else if (dcen) begin
      out_clk = ~clk;
      cp_int  = ~clk;
    end else begin
      out_clk = clk_dly;
      cp_int  = ~(clk & ~clk_dly);
    end
    cp = atspeed ? 1'b0 : (pten ? ptwin : cp_int);
  end

endmodule
