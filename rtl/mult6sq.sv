// MULT6SQ: a 6 x 6 multiplier followed by a squarer (a 12-input, 6-output
// CUT).
//
// The first 6 x 6 multiplier forms A*B; its upper six product bits drive both
// operands of a second 6 x 6 multiplier, which therefore squares them. Only
// the six most significant bits of the square are output. With 12 inputs the
// circuit is small enough for an N^2 exhaustive test (every ordered pair of
// input vectors).
//
// Combinational. Chip-defined: two cascaded 6x6 multipliers, the second used
// as a squarer, and the 6-MSB output. Design choices: A = in_vec[5:0],
// B = in_vec[11:6], and the squarer fed by the upper half of A*B.
module mult6sq (
  input  logic [11:0] in_vec,
  output logic [5:0]  q_msb
);

  logic [11:0] p1, p2;

  mult6x6 u_mul (.a(in_vec[5:0]), .b(in_vec[11:6]), .p(p1));
  mult6x6 u_sq  (.a(p1[11:6]),    .b(p1[11:6]),     .p(p2));

  assign q_msb = p2[11:6];

endmodule
