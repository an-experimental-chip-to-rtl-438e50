// One-bit full adder cell used by the array multipliers.
// s = a ^ b ^ ci, co = majority(a, b, ci). Combinational.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic s,
  output logic co
);
  assign s  = a ^ b ^ ci;
  assign co = (a & b) | (a & ci) | (b & ci);
endmodule
