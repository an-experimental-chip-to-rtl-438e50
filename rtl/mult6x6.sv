// N x N unsigned shift-and-add array multiplier (N = 6 on the chip).
//
// The building block of both multiplier CUTs. Partial product row j is
// a & {N{b[j]}} (AND gates). Row 0 is taken as the running sum; every later
// row is added to the upper N bits of the running sum by a ripple row of
// full adders, and the lowest bit of the running sum drops out as the next
// product bit (the "shift" of shift-and-add). After N-1 rows the remaining
// N bits and the last carry form the top of the product.
//
// Combinational; 2N product bits. Chip-defined: add-and-shift with AND gates
// and full adders. Design choice: the ripple-row arrangement.
module mult6x6 #(
  parameter int unsigned N = 6
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);

  // acc[j]: N-bit running sum entering row j (bit N is the row's carry out)
  logic [N:0]   acc  [N];
  logic [N-1:0] pp   [N];
  logic [N:0]   cy   [N];

  for (genvar j = 0; j < N; j++) begin : g_pp
    assign pp[j] = a & {N{b[j]}};
  end

  assign acc[0] = {1'b0, pp[0]};
  assign p[0]   = pp[0][0];

  for (genvar j = 1; j < N; j++) begin : g_row
    logic [N-1:0] sum;
    assign cy[j][0] = 1'b0;
    for (genvar i = 0; i < N; i++) begin : g_fa
      full_adder u_fa (
        .a (pp[j][i]),
        .b (acc[j-1][i+1]),
        .ci(cy[j][i]),
        .s (sum[i]),
        .co(cy[j][i+1])
      );
    end
    assign acc[j] = {cy[j][N], sum};
    assign p[j]   = sum[0];
  end

  assign cy[0] = '0;
  assign p[2*N-1:N] = acc[N-1][N:1];

endmodule
