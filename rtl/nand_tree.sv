// Parametric NAND tree (PAROUT).
//
// A chain of NAND gates over the primary inputs: t0 = ~in[0],
// t(i) = ~(t(i-1) & in[i]), out = t(N-1). Starting from all inputs low and
// raising them one at a time from the output end, the output toggles at every
// step, so the input thresholds (VIH, VIL) of every pin can be measured
// through one output pin without exercising the core logic.
//
// Combinational. Chip-defined: a NAND tree on the primary inputs driving
// PAROUT. Design choice: the chain structure and the pin order.
module nand_tree #(
  parameter int unsigned N = 59
) (
  input  logic [N-1:0] in_vec,
  output logic         out
);

  logic [N-1:0] t;

  assign t[0] = ~in_vec[0];
  for (genvar i = 1; i < N; i++) begin : g_nand
    assign t[i] = ~(t[i-1] & in_vec[i]);
  end

  assign out = t[N-1];

endmodule
