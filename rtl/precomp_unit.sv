// precomp_unit: equality check of one digit pair.
//
// Each bit of the A digit is XORed with the matching bit of the B digit and
// the XOR outputs are ORed together. The OR output `s` is 0 when the two
// digits are equal and 1 when they differ; it is the line that stops the
// counter and enables the tristate buffer. `diff` exposes the XOR outputs.
// Purely combinational.
module precomp_unit #(
  parameter int unsigned DW = qca_cmp_pkg::DEFAULT_DIGIT
) (
  input  logic [DW-1:0] a_digit,
  input  logic [DW-1:0] b_digit,
  output logic [DW-1:0] diff,  // per-bit XOR
  output logic          s      // 1: digits differ
);
  assign diff = a_digit ^ b_digit;
  assign s    = |diff;
endmodule
