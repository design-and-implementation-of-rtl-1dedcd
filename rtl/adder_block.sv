// adder_block: decides which of two unequal digits is greater, using the
// carry-generation equation of a carry-lookahead adder.
//
// With generate G_i = ~A_i & B_i and propagate P_i = ~(A_i ^ B_i) the carry
// out of the digit, Cout = G_1 + P_1 G_0 for a 2-bit digit, is 1 exactly when
// the B digit is greater than the A digit. For DW > 2 the same recurrence
// c_i = G_i + P_i c_(i-1), c_0 = G_0, is applied bit by bit (this design's
// generalisation). Every AND and OR is a majority gate with one input tied to
// 0 or 1, as in QCA logic. `bbiga` = Cout and `abigb` = not Cout; both are
// held low when `valid` is low (equal digits, nothing passed on). Purely
// combinational.
module adder_block #(
  parameter int unsigned DW = qca_cmp_pkg::DEFAULT_DIGIT
) (
  input  logic          valid,
  input  logic [DW-1:0] a_digit,
  input  logic [DW-1:0] b_digit,
  output logic          bbiga,
  output logic          abigb
);
  logic [DW-1:0] g, c;
  logic          bg_valid, ag_valid;

  for (genvar i = 0; i < DW; i++) begin : g_bit
    // G_i = ~A_i AND B_i
    maj3 u_gen (.a(~a_digit[i]), .b(b_digit[i]), .c(1'b0), .y(g[i]));
    if (i == 0) begin : g_lsb
      assign c[i] = g[i];
    end else begin : g_chain
      logic p, pc;
      assign p = ~(a_digit[i] ^ b_digit[i]);
      // P_i AND c_(i-1), then G_i OR that
      maj3 u_and (.a(p),    .b(c[i-1]), .c(1'b0), .y(pc));
      maj3 u_or  (.a(g[i]), .b(pc),     .c(1'b1), .y(c[i]));
    end
  end

  maj3 u_bbiga (.a(valid), .b(c[DW-1]),  .c(1'b0), .y(bg_valid));
  maj3 u_abigb (.a(valid), .b(~c[DW-1]), .c(1'b0), .y(ag_valid));
  assign bbiga = bg_valid;
  assign abigb = ag_valid;
endmodule
