// MULT12O12: 12 x 12 unsigned multiplier that outputs only the 12 most
// significant product bits (a 24-input, 12-output CUT).
//
// The operands are split into 6-bit halves and four 6 x 6 shift-and-add
// multipliers form the partial products
//   PP1 = AL*BL, PP2 = AH*BL, PP3 = AL*BH, PP4 = AH*BH,
// which a summing stage adds as PP1 + (PP2 + PP3) << 6 + PP4 << 12. Only bits
// 23:12 leave the circuit, which lowers the observability of faults in the
// low-order logic.
//
// Combinational. Chip-defined: the four 6x6 blocks, their operand halves and
// the 12-MSB output. Design choices: A = in_vec[11:0], B = in_vec[23:12], and
// the summing stage written as word additions.
module mult12o12 (
  input  logic [23:0] in_vec,
  output logic [11:0] p_msb
);

  logic [5:0]  al, ah, bl, bh;
  logic [11:0] pp1, pp2, pp3, pp4;
  logic [23:0] prod;

  assign {ah, al} = in_vec[11:0];
  assign {bh, bl} = in_vec[23:12];

  mult6x6 u_pp1 (.a(al), .b(bl), .p(pp1));
  mult6x6 u_pp2 (.a(ah), .b(bl), .p(pp2));
  mult6x6 u_pp3 (.a(al), .b(bh), .p(pp3));
  mult6x6 u_pp4 (.a(ah), .b(bh), .p(pp4));

  assign prod  = 24'(pp1) + (24'(pp2) << 6) + (24'(pp3) << 6) + (24'(pp4) << 12);
  assign p_msb = prod[23:12];

endmodule
