// Behavioural model of the internal delay line of the self-generated clocking
// mode (not synthesizable logic: on silicon this is a chain of gates whose
// delay follows the die's process speed).
//
// The master clock enters, and the same waveform leaves DELAY_NS later; the
// delayed rising edge is the output (sampling) clock, so the delay is the
// test time T_C of that die. It is a transport delay: every edge passes.
//
// Chip-defined: its role. Design choice: the delay value, which defaults to
// the 30 ns nominal delay of the multiplier CUTs.
module delay_line #(
  parameter real DELAY_NS = 30.0
) (
  input  logic in_sig,
  output logic out_sig
);
  timeunit 1ns;
  timeprecision 1ps;

  initial out_sig = 1'b0;

  always @(in_sig) out_sig <= #(DELAY_NS) in_sig;

endmodule
