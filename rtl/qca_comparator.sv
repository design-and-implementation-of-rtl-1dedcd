// qca_comparator: digit-serial magnitude comparator with early termination.
//
// The two N-bit operands are cut into N/DW digits of DW bits and examined one
// digit at a time from the most significant end. The input buffer shifts one
// bit of each operand per counter tick into the set (digit) buffer; when the
// counter reaches 0 the digit pair is checked for equality by XOR gates and
// an OR. The first pair that differs stops the counter and is passed through
// the tristate buffer to the adder block, which resolves it with the CLA carry
// equation and raises `bbiga` or `abigb`. If every pair is equal the search
// runs to the last digit and `aeqb` rises. Less significant digits after the
// first difference are never examined.
//
// Interface: pulse `start` with `a` and `b` valid for one cycle. `busy` is high
// while digits are being checked; `done` rises after DW*(k+1)+1 clock edges
// when digit k (0 = most significant) decides, N+1 edges for equal operands,
// and stays high, with exactly one of aeqb/abigb/bbiga high, until the next
// `start`. The result outputs are low while `done` is low.
//
// Following the block diagram: input buffer, counter, set buffer, XOR/OR
// equality check whose output (RES) halts the counter, tristate buffer and
// adder block. This design's own choices: a synchronous `start`, clock
// enables in place of the gated clock, registered `done`, and results gated
// by `done`. Asynchronous active-low reset.
module qca_comparator #(
  parameter int unsigned N  = qca_cmp_pkg::DEFAULT_WIDTH,
  parameter int unsigned DW = qca_cmp_pkg::DEFAULT_DIGIT
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic         busy,
  output logic         done,
  output logic         aeqb,
  output logic         abigb,
  output logic         bbiga
);
  logic          shift_en, digit_ready;
  logic          a_bit, b_bit;
  logic [DW-1:0] a_digit, b_digit;
  logic [DW-1:0] a_sel, b_sel;
  logic          s, sel_valid;

  input_buffer #(.N(N)) u_ib (
    .clk, .rst_n, .load(start), .shift_en, .a, .b,
    .a_msb(a_bit), .b_msb(b_bit)
  );

  digit_counter #(.N(N), .DW(DW)) u_cnt (
    .clk, .rst_n, .start, .res(s), .shift_en, .digit_ready, .last_digit(),
    .busy, .done
  );

  set_buffer #(.DW(DW)) u_db (
    .clk, .rst_n, .clear(start), .shift_en, .a_bit, .b_bit, .a_digit, .b_digit
  );

  precomp_unit #(.DW(DW)) u_eq (
    .a_digit, .b_digit, .diff(), .s
  );

  tristate_buffer #(.DW(DW)) u_tri (
    .en(done && s), .a_in(a_digit), .b_in(b_digit),
    .a_out(a_sel), .b_out(b_sel), .valid(sel_valid)
  );

  adder_block #(.DW(DW)) u_add (
    .valid(sel_valid), .a_digit(a_sel), .b_digit(b_sel), .bbiga, .abigb
  );

  assign aeqb = done && !s;

  // Once done, the set buffer is frozen, so exactly one result is high.
  a_one_result : assert property (@(posedge clk) disable iff (!rst_n)
    done |-> $onehot({aeqb, abigb, bbiga}));
  // The counter only ever checks a full digit while busy.
  a_ready_busy : assert property (@(posedge clk) disable iff (!rst_n)
    digit_ready |-> busy);
endmodule
