// digit_counter: the counter that paces the bit shifts and stops the search.
//
// `start` loads the bit count with the digit size DW and the digit count with
// N/DW - 1. While running, each cycle with a non-zero bit count is a tick:
// `shift_en` moves one bit of each operand into the set buffer and the count
// goes down by one. When it reaches 0 a whole digit sits in the set buffer
// (`digit_ready`). In that cycle the RES line (`res`, the OR output of the
// equality check) decides: if the digits differ, or this was the last digit,
// the counter stops and `done` rises one cycle later and stays high until the
// next `start`. Otherwise the first bit of the next digit is shifted in during
// the same cycle and the bit count is reloaded with DW-1, so every digit after
// the first costs DW cycles.
//
// Timing, counted in rising edges after the edge that samples `start`: the
// digit k (0 = most significant) is ready after DW*(k+1) edges and `done` is
// high after DW*(k+1)+1 edges; an equal pair therefore takes N+1 edges.
// The block diagram gates the input buffer's clock with the counter; here the
// same ticks drive synchronous enables instead. Asynchronous active-low reset.
module digit_counter #(
  parameter int unsigned N  = qca_cmp_pkg::DEFAULT_WIDTH,
  parameter int unsigned DW = qca_cmp_pkg::DEFAULT_DIGIT
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  logic res,          // 1: the digit in the set buffer differs
  output logic shift_en,     // tick: shift one bit into the set buffer
  output logic digit_ready,  // a full digit is in the set buffer
  output logic last_digit,   // the digit in the set buffer is the least significant
  output logic busy,
  output logic done
);
  localparam int unsigned ND = N / DW;  // digits per operand
  localparam int unsigned CW = $clog2(DW + 1);
  localparam int unsigned DCW = (ND > 1) ? $clog2(ND) : 1;

  if (N % DW != 0) begin : g_bad_size
    $error("digit_counter: N must be a multiple of DW");
  end

  logic [CW-1:0]  bit_cnt;    // bits still to shift into the current digit
  logic [DCW-1:0] digit_cnt;  // digits left after the current one
  logic           running;
  logic           stop;

  assign digit_ready = running && (bit_cnt == '0);
  assign last_digit  = (digit_cnt == '0);
  assign stop        = digit_ready && (res || last_digit);
  assign shift_en    = running && !stop;
  assign busy        = running;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bit_cnt   <= '0;
      digit_cnt <= '0;
      running   <= 1'b0;
      done      <= 1'b0;
    end else if (start) begin
      bit_cnt   <= CW'(DW);
      digit_cnt <= DCW'(ND - 1);
      running   <= 1'b1;
      done      <= 1'b0;
    end else if (running) begin
      if (bit_cnt != '0) begin
        bit_cnt <= bit_cnt - 1'b1;
      end else if (stop) begin
        running <= 1'b0;
        done    <= 1'b1;
      end else begin
        bit_cnt   <= CW'(DW - 1);
        digit_cnt <= digit_cnt - 1'b1;
      end
    end
  end
endmodule
