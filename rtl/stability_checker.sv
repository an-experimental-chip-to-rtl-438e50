// Stability checkers: flag any change of a CUT output during the checking
// period (post-sample window).
//
// Per bit there are two set-only latches: Y1 = D | (CP & Y1) remembers that D
// has been 1, Y2 = ~D | (CP & Y2) remembers that D has been 0. While CP is low
// they just follow D and ~D, so ERROR = Y1 & Y2 = 0; once CP is high, a rise
// of D sets Y1 and a fall of D sets Y2, and ERROR goes high as soon as both
// values have been seen inside the window. Lowering CP resets the checker.
// A fault-free CUT never changes during the window, since its inputs are held
// and its outputs settled before sampling; a late transition is a delay fault.
//
// Asynchronous (level-sensitive latches, intended). Chip-defined: the
// two-latch circuit and its behaviour. Design choice: a vector of WIDTH
// independent checkers.
module stability_checker #(
  parameter int unsigned WIDTH = 1
) (
  input  logic [WIDTH-1:0] d,
  input  logic             cp,
  output logic [WIDTH-1:0] error
);

  logic [WIDTH-1:0] y1, y2;

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    always_latch begin
      if (!cp)       y1[i] = d[i];
      else if (d[i]) y1[i] = 1'b1;
    end
    always_latch begin
      if (!cp)        y2[i] = ~d[i];
      else if (!d[i]) y2[i] = 1'b1;
    end
  end

  assign error = y1 & y2;

endmodule
