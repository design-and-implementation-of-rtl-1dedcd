// tb_digit_counter: for the default 16-bit word and 2-bit digit, raises RES at
// a chosen digit (or never) and checks the counter's timing: digit k is ready
// 2*(k+1) edges after the edge that samples start, done follows one edge later,
// exactly 2*(k+1) shift ticks are issued, and the counter then stays stopped.
module tb_digit_counter;
  localparam int N = 16, DW = 2, ND = N / DW;
  logic clk = 1'b0, rst_n = 1'b0;
  logic start, res, shift_en, digit_ready, last_digit, busy, done;
  int checks = 0, failures = 0;

  digit_counter dut (.clk, .rst_n, .start, .res, .shift_en, .digit_ready,
                     .last_digit, .busy, .done);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int stop_digit);  // stop_digit >= ND: never
    int edges = 0, ticks = 0, digits = 0, want_k;
    want_k = (stop_digit < ND) ? stop_digit : ND - 1;
    @(negedge clk);
    start = 1'b1; res = 1'b0;
    @(negedge clk);
    start = 1'b0;
    edges = 0;
    while (!done && edges < 100) begin
      logic was_ready;
      res = digit_ready && (digits == stop_digit);
      #1;
      was_ready = digit_ready;
      if (shift_en) ticks++;
      if (digit_ready) begin
        checks++;
        if (edges != DW * (digits + 1)) begin
          failures++; $display("FAIL digit %0d ready after %0d edges", digits, edges);
        end
        checks++;
        if (last_digit !== (digits == ND - 1)) failures++;
      end
      @(negedge clk);
      edges++;
      if (was_ready) digits++;
    end
    checks++;
    if (edges != DW * (want_k + 1) + 1) begin
      failures++; $display("FAIL stop %0d: done after %0d edges", stop_digit, edges);
    end
    checks++;
    if (ticks != DW * (want_k + 1)) begin
      failures++; $display("FAIL stop %0d: %0d ticks", stop_digit, ticks);
    end
    res = 1'b0;
    repeat (3) @(negedge clk);
    checks++;
    if (!done || busy || shift_en) begin
      failures++; $display("FAIL counter did not stay stopped");
    end
  endtask

  initial begin
    start = 1'b0; res = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int k = 0; k <= ND; k++) run(k);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
