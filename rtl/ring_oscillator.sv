// Behavioural model of the controllable ring oscillator (not synthesizable
// logic: its frequency is a property of the die).
//
// While en is high the output toggles every HALF_PERIOD_NS; while en is low
// it is held at 0. On the chip it is enabled when all six SRSEL pins are high
// and is observed on DOUT23; its frequency is logged for every die as a
// measure of the die's speed.
//
// Chip-defined: the enable and where it is observed. Design choice: the
// period.
module ring_oscillator #(
  parameter real HALF_PERIOD_NS = 5.0
) (
  input  logic en,
  output logic osc
);
  timeunit 1ns;
  timeprecision 1ps;

  initial osc = 1'b0;

  always begin
    #(HALF_PERIOD_NS);
    osc = en ? ~osc : 1'b0;
  end

endmodule
