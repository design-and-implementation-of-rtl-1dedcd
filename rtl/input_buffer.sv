// input_buffer: holds the two operands and feeds them out MSB first.
//
// On `load` both N-bit operands are captured. On every cycle with `shift_en`
// high (one counter tick) both registers shift left by one, so `a_msb` and
// `b_msb` present the next bit of each operand, most significant first, to the
// set buffer. In the block diagram this register is clocked by the counter
// output ANDed with the clock and held by the inverted RES line; here the same
// behaviour is a synchronous shift enable driven by the counter, which is this
// design's choice (no gated clock). Asynchronous active-low reset clears it.
module input_buffer #(
  parameter int unsigned N = qca_cmp_pkg::DEFAULT_WIDTH
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,      // capture a and b (has priority over shift)
  input  logic         shift_en,  // shift both operands left by one bit
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic         a_msb,     // current most significant bit of A
  output logic         b_msb      // current most significant bit of B
);
  logic [N-1:0] a_q, b_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_q <= '0;
      b_q <= '0;
    end else if (load) begin
      a_q <= a;
      b_q <= b;
    end else if (shift_en) begin
      a_q <= a_q << 1;
      b_q <= b_q << 1;
    end
  end

  assign a_msb = a_q[N-1];
  assign b_msb = b_q[N-1];
endmodule
