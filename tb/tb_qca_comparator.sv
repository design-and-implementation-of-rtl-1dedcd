// tb_qca_comparator: end-to-end test of the comparator at its default size
// (16-bit operands, 2-bit digits), with no parameter overrides.
//
// Every comparison is started with a one-cycle `start` pulse and checked
// against integer comparison of the operands, both for the result flags and
// for the latency: if the most significant differing bit lies in digit k
// (0 = most significant digit) `done` must rise DW*(k+1)+1 edges after the
// start edge, N+1 edges for equal operands. The stimulus covers the operand
// pairs shown in the published waveforms, a difference placed in each digit
// in turn, equal operands and random pairs. It counts how often the search
// stopped at the first digit, stopped early at an inner digit, was decided at
// the last digit, and ran through with all digits equal; each must occur.
module tb_qca_comparator;
  localparam int N = 16, DW = 2, ND = N / DW;
  logic         clk = 1'b0, rst_n = 1'b0;
  logic         start;
  logic [N-1:0] a, b;
  logic         busy, done, aeqb, abigb, bbiga;
  int checks = 0, failures = 0;
  int n_first = 0, n_inner = 0, n_last = 0, n_equal = 0;

  qca_comparator dut (.clk, .rst_n, .start, .a, .b, .busy, .done, .aeqb, .abigb, .bbiga);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // digit index (from the most significant) of the first difference, ND if none
  function automatic int first_diff_digit(logic [N-1:0] x, logic [N-1:0] y);
    for (int i = N - 1; i >= 0; i--)
      if (x[i] != y[i]) return (N - 1 - i) / DW;
    return ND;
  endfunction

  task automatic compare(input logic [N-1:0] va, input logic [N-1:0] vb);
    int edges, k, want_edges;
    k = first_diff_digit(va, vb);
    want_edges = DW * (((k < ND) ? k : ND - 1) + 1) + 1;
    @(negedge clk);
    a = va; b = vb; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    a = N'($urandom); b = N'($urandom);  // operands are only needed at start
    edges = 0;
    checks++;
    if (!busy || done) begin failures++; $display("FAIL not busy after start"); end
    while (!done && edges < 4 * N) begin
      checks++;
      if (aeqb || abigb || bbiga) begin failures++; $display("FAIL result before done"); end
      @(negedge clk);
      edges++;
    end
    checks++;
    if (edges != want_edges) begin
      failures++;
      $display("FAIL a=%h b=%h: done after %0d edges, want %0d", va, vb, edges, want_edges);
    end
    checks++;
    if (aeqb !== (va == vb) || abigb !== (va > vb) || bbiga !== (vb > va) || busy) begin
      failures++;
      $display("FAIL a=%h b=%h: aeqb=%b abigb=%b bbiga=%b", va, vb, aeqb, abigb, bbiga);
    end
    if (k == 0) n_first++;
    else if (k < ND - 1) n_inner++;
    else if (k == ND - 1) n_last++;
    else n_equal++;
    // result must hold while idle
    repeat (2) @(negedge clk);
    checks++;
    if (!done || aeqb !== (va == vb) || abigb !== (va > vb) || bbiga !== (vb > va)) begin
      failures++; $display("FAIL result not held a=%h b=%h", va, vb);
    end
  endtask

  initial begin
    logic [N-1:0] x, y;
    start = 1'b0; a = '0; b = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // operand pairs of the published waveforms (4-, 8- and 16-bit runs)
    compare(16'h0000, 16'h0000);
    compare(16'h0002, 16'h0009);
    compare(16'h0007, 16'h0009);
    compare(16'h0007, 16'h000A);
    compare(16'h0006, 16'h000A);
    compare(16'h0002, 16'h0003);
    compare(16'h0006, 16'h0003);
    compare(16'h0006, 16'h0007);
    compare(16'h0003, 16'h0000);
    compare(16'h0002, 16'h0002);
    compare(16'h0001, 16'h0002);
    compare(16'hFFFF, 16'h0000);
    compare(16'h0000, 16'hFFFF);
    // one difference placed in each digit, both directions
    for (int k = 0; k < ND; k++)
      for (int r = 0; r < 6; r++) begin
        x = N'($urandom);
        y = x ^ (N'($urandom % ((1 << DW) - 1) + 1) << (N - DW * (k + 1)));
        compare(x, y);
      end
    // equal operands
    for (int r = 0; r < 20; r++) begin
      x = N'($urandom);
      compare(x, x);
    end
    // random pairs
    for (int r = 0; r < 500; r++) compare(N'($urandom), N'($urandom));
    // a start while busy restarts the search with the new operands
    @(negedge clk);
    a = 16'h1234; b = 16'h1234; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    repeat (3) @(negedge clk);
    compare(16'h8000, 16'h7FFF);

    $display("stops: first digit %0d, inner digit %0d, last digit %0d, all equal %0d",
             n_first, n_inner, n_last, n_equal);
    checks++; if (n_first == 0) begin failures++; $display("FAIL no first-digit stop"); end
    checks++; if (n_inner == 0) begin failures++; $display("FAIL no inner-digit stop"); end
    checks++; if (n_last  == 0) begin failures++; $display("FAIL no last-digit decision"); end
    checks++; if (n_equal == 0) begin failures++; $display("FAIL no all-equal run"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
