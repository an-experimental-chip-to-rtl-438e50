// Parallel Data Load LFSR: the input register that applies vectors to all CUTs.
//
// One 24-bit register is clocked by the input clock and, depending on the
// source mode, is either
//   SRC_DIRECT  : loaded with the tester's vector DIN,
//   SRC_SHIFTED : loaded with DIN shifted by one bit and then with DIN itself
//                 on the next input clock (a simulated scan load; the tester
//                 holds DIN for two clocks and the first vector of each pair
//                 is masked),
//   SRC_PRAND   : stepped as a Fibonacci LFSR with the primitive polynomial
//                 x^24+x^7+x^2+x+1, so it runs through all 2^24-1 nonzero
//                 states. Stage i moves to stage i+1, so any set of every
//                 second stage sees all ordered pairs of its 12-bit values
//                 (the N^2 exhaustive test of the 12-input CUT).
//   SRC_HOLD    : keeps its value.
// A mask bit travels with each vector: it is set when MASKF is low or the
// vector is the shifted half of a pair, and tells the observers to ignore the
// response to that vector. RESET (asynchronous) clears only the pair phase and
// the mask, as on the chip; the vector register is set by loading it.
// The MSB is brought out (DOUT23) so the register can be observed directly.
//
// Chip-defined: the polynomial, the three modes and the MSB output.
// Design choices: the shifted vector is {0, DIN[23:1]}; mode 11 holds.
module data_source
  import testchip_pkg::*;
#(
  parameter int unsigned    WIDTH         = 24,
  parameter logic [WIDTH-1:0] FEEDBACK_MASK = WIDTH'(POLY24)
) (
  input  logic             clk,       // input clock
  input  logic             rst,       // RESET pin
  input  src_mode_e        mode,
  input  logic [WIDTH-1:0] din,
  input  logic             maskf,     // low: ignore failures on this vector
  output logic [WIDTH-1:0] vec,
  output logic             vec_mask,
  output logic             msb
);

  logic pair_second;  // 1: next load in shifted mode is the vector itself

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      pair_second <= 1'b0;
      vec_mask    <= 1'b1;
    end else begin
      if (mode == SRC_SHIFTED) begin
        pair_second <= ~pair_second;
        vec_mask    <= ~pair_second | ~maskf;
      end else begin
        pair_second <= 1'b0;
        vec_mask    <= ~maskf;
      end
    end
  end

  always_ff @(posedge clk) begin
    unique case (mode)
      SRC_DIRECT:  vec <= din;
      SRC_SHIFTED: vec <= pair_second ? din : {1'b0, din[WIDTH-1:1]};
      SRC_PRAND:   vec <= {vec[WIDTH-2:0], ^(vec & FEEDBACK_MASK)};
      default:     vec <= vec;
    endcase
  end

  assign msb = vec[WIDTH-1];

endmodule
