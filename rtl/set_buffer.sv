// set_buffer: the digit buffer, two DW-bit shift registers holding the digit
// of A and of B that is being compared.
//
// Each cycle with `shift_en` high one bit of each operand enters at the least
// significant end, so after DW shifts the first bit taken (the most
// significant one of the digit) sits at bit DW-1. `clear` empties both
// registers at the start of a comparison. Holding the contents while the
// shift is stopped keeps the unequal digit available to the adder block.
// Asynchronous active-low reset.
module set_buffer #(
  parameter int unsigned DW = qca_cmp_pkg::DEFAULT_DIGIT
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,
  input  logic          shift_en,
  input  logic          a_bit,
  input  logic          b_bit,
  output logic [DW-1:0] a_digit,
  output logic [DW-1:0] b_digit
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_digit <= '0;
      b_digit <= '0;
    end else if (clear) begin
      a_digit <= '0;
      b_digit <= '0;
    end else if (shift_en) begin
      a_digit <= (a_digit << 1) | DW'(a_bit);
      b_digit <= (b_digit << 1) | DW'(b_bit);
    end
  end
endmodule
