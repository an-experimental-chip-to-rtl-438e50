// Reconfigurable serial / parallel signature register for the four copies of
// MULT12O12 (48 latched outputs).
//
// Serial mode (srserf = 0): a 48-to-1 multiplexer picks output bit srsel
// (copy c bit i is input 12c+i) and feeds it into an LFSR of 12, 16, 24 or 48
// stages (srmode). Stages above the selected length hold.
// Parallel mode (srserf = 1): the 48 stages form one 48-bit, two 24-bit,
// three 16-bit or four 12-bit multiple-input signature registers (MISRs);
// segment j has stages j*n .. j*n+n-1 and takes output bits j*n .. j*n+n-1,
// so in the 4 x 12 mode each copy has its own MISR.
// Each segment shifts towards its top stage; the feedback (XOR of the tap
// stages) enters its bottom stage and every stage XORs its input bit in.
// Scan mode (srsel = 111xxx): the 48 stages are one shift chain
// srsi -> stage 0 ... stage 47 -> srso, used to load a seed and to read
// signatures (also intermediate ones) out to the tester.
//
// Synchronous to clk. Chip-defined: the 48:1 mux, the four lengths, the four
// MISR groupings, the pins and their encodings. Design choices: the feedback
// polynomials (primitive ones for 12, 16, 24 and 48 bits) and the mapping of
// output bits to stages.
module signature_register
  import testchip_pkg::*;
#(
  parameter int unsigned WIDTH = 48
) (
  input  logic             clk,
  input  logic [WIDTH-1:0] resp,
  input  logic [5:0]       srsel,
  input  sr_mode_e         srmode,
  input  logic             srserf,
  input  logic             srsi,
  output logic             srso,
  output logic [WIDTH-1:0] sig
);

  // One clock of a register made of WIDTH/n segments of n stages each, with
  // tap mask `poly` (bit t-1 for the term x^t) and data inputs `dv`.
  function automatic logic [WIDTH-1:0] step(input logic [WIDTH-1:0] s,
                                            input logic [WIDTH-1:0] dv,
                                            input int unsigned      n,
                                            input logic [WIDTH-1:0] poly);
    logic [WIDTH-1:0] nx;
    for (int unsigned base = 0; base < WIDTH; base += n) begin
      logic fb;
      fb = 1'b0;
      for (int unsigned i = 0; i < n; i++) fb ^= s[base+i] & poly[i];
      nx[base] = fb ^ dv[base];
      for (int unsigned i = 1; i < n; i++) nx[base+i] = s[base+i-1] ^ dv[base+i];
    end
    return nx;
  endfunction

  int unsigned      seg_n;
  logic [WIDTH-1:0] seg_poly;
  logic [WIDTH-1:0] sel_keep;   // stages that take part in the serial LFSR
  logic             ser_in;
  logic [WIDTH-1:0] nxt;

  always_comb begin
    unique case (srmode)
      SR_12X4: begin seg_n = 12; seg_poly = WIDTH'(POLY12); end
      SR_16X3: begin seg_n = 16; seg_poly = WIDTH'(POLY16); end
      SR_24X2: begin seg_n = 24; seg_poly = WIDTH'(POLY24); end
      default: begin seg_n = 48; seg_poly = WIDTH'(POLY48); end
    endcase
    sel_keep = '0;
    for (int unsigned i = 0; i < WIDTH; i++) sel_keep[i] = (i < seg_n);
    ser_in = (srsel < 6'(WIDTH)) ? resp[srsel] : 1'b0;

    if (!srserf) begin
      // serial: one segment of seg_n stages at the bottom, one input bit
      unique case (srmode)
        SR_12X4: nxt = step(sig, WIDTH'(ser_in), 12, seg_poly);
        SR_16X3: nxt = step(sig, WIDTH'(ser_in), 16, seg_poly);
        SR_24X2: nxt = step(sig, WIDTH'(ser_in), 24, seg_poly);
        default: nxt = step(sig, WIDTH'(ser_in), 48, seg_poly);
      endcase
      nxt = (nxt & sel_keep) | (sig & ~sel_keep);
    end else begin
      unique case (srmode)
        SR_12X4: nxt = step(sig, resp, 12, seg_poly);
        SR_16X3: nxt = step(sig, resp, 16, seg_poly);
        SR_24X2: nxt = step(sig, resp, 24, seg_poly);
        default: nxt = step(sig, resp, 48, seg_poly);
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (srsel[5:3] == 3'b111) sig <= {sig[WIDTH-2:0], srsi};
    else                      sig <= nxt;
  end

  assign srso = sig[WIDTH-1];

endmodule
