// tb_set_buffer: shifts random bit streams into the 2-bit digit buffer with a
// random shift enable and clear, and compares both digits after every clock
// with a reference that keeps the last two shifted bits, newest at bit 0.
module tb_set_buffer;
  logic       clk = 1'b0, rst_n = 1'b0;
  logic       clear, shift_en, a_bit, b_bit;
  logic [1:0] a_digit, b_digit, ref_a, ref_b;
  int checks = 0, failures = 0;

  set_buffer dut (.clk, .rst_n, .clear, .shift_en, .a_bit, .b_bit, .a_digit, .b_digit);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clear = 1'b0; shift_en = 1'b0; a_bit = 1'b0; b_bit = 1'b0;
    ref_a = '0; ref_b = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      clear    = ($urandom % 16) == 0;
      shift_en = 1'($urandom);
      a_bit    = 1'($urandom);
      b_bit    = 1'($urandom);
      @(posedge clk);
      if (clear) begin
        ref_a = '0; ref_b = '0;
      end else if (shift_en) begin
        ref_a = {ref_a[0], a_bit};
        ref_b = {ref_b[0], b_bit};
      end
      #1;
      checks++;
      if (a_digit !== ref_a || b_digit !== ref_b) begin
        failures++;
        $display("FAIL step %0d: got %b %b want %b %b", n, a_digit, b_digit, ref_a, ref_b);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
