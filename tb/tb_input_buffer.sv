// tb_input_buffer: loads random 16-bit operands and shifts them out, with
// random pauses, checking that the presented bits follow the operands from the
// most significant bit down.
module tb_input_buffer;
  localparam int N = 16;
  logic         clk = 1'b0, rst_n = 1'b0;
  logic         load, shift_en, a_msb, b_msb;
  logic [N-1:0] a, b;
  int checks = 0, failures = 0;

  input_buffer dut (.clk, .rst_n, .load, .shift_en, .a, .b, .a_msb, .b_msb);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    load = 1'b0; shift_en = 1'b0; a = '0; b = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 50; t++) begin
      @(negedge clk);
      a = N'($urandom); b = N'($urandom);
      load = 1'b1;
      @(negedge clk);
      load = 1'b0;
      for (int i = N - 1; i >= 0; ) begin
        checks++;
        if (a_msb !== a[i] || b_msb !== b[i]) begin
          failures++;
          $display("FAIL bit %0d: got %b %b want %b %b", i, a_msb, b_msb, a[i], b[i]);
        end
        shift_en = 1'($urandom);
        if (shift_en) i--;
        @(negedge clk);
        shift_en = 1'b0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
