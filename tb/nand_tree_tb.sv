// Parametric NAND tree: raising the pins one at a time from the output end
// must toggle the output at every step; random patterns are compared with
// an independent model of the chain.
module nand_tree_tb;
  timeunit 1ns; timeprecision 1ps;
  localparam int N = 59;
  logic [N-1:0] in_vec;
  logic         out;
  int checks = 0, failures = 0;

  nand_tree #(.N(N)) dut (.in_vec(in_vec), .out(out));

  function automatic logic model(input logic [N-1:0] v);
    logic t;
    t = !v[0];
    for (int i = 1; i < N; i++) t = !(t && v[i]);
    return t;
  endfunction

  task automatic check(input logic [N-1:0] v);
    in_vec = v;
    #1;
    checks++;
    if (out !== model(v)) begin
      failures++;
      $display("FAIL in=%h", v);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic         prev;
    logic [N-1:0] v;
    // all pins low, then raise them one by one from the output end: the
    // output must toggle at every step
    v = '0;
    check(v);
    prev = out;
    for (int i = N - 1; i >= 0; i--) begin
      v[i] = 1'b1;
      check(v);
      checks++;
      if (out === prev) begin
        failures++;
        $display("FAIL raising pin %0d does not toggle the output", i);
      end
      prev = out;
    end
    for (int n = 0; n < 2000; n++) check({$urandom, $urandom});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
