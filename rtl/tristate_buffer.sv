// tristate_buffer: gate between the set buffer and the adder block.
//
// When `en` is high the two digits pass through and `valid` is high; when it
// is low the outputs are released. A real tristate output cannot be modelled
// by a two-state simulator nor driven inside a synthesized block, so "released"
// is represented here by all-zero data together with `valid` low; the adder
// block uses `valid` to keep both of its outputs low, so `valid` is simply the
// enable passed on. Purely combinational.
module tristate_buffer #(
  parameter int unsigned DW = qca_cmp_pkg::DEFAULT_DIGIT
) (
  input  logic          en,
  input  logic [DW-1:0] a_in,
  input  logic [DW-1:0] b_in,
  output logic [DW-1:0] a_out,
  output logic [DW-1:0] b_out,
  output logic          valid
);
  assign a_out = en ? a_in : '0;
  assign b_out = en ? b_in : '0;
  assign valid = en;
endmodule
