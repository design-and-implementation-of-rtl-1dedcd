// tb_qca_comparator_widths: runs the comparator at the 4-bit and 8-bit word
// widths the design was also evaluated at (2-bit digits), comparing every
// operand pair exhaustively against integer comparison and checking the
// latency rule DW*(k+1)+1 edges for a decision at digit k (N+1 when equal).
module tb_qca_comparator_widths;
  localparam int DW = 2;
  logic       clk = 1'b0, rst_n = 1'b0;
  logic       start4, start8;
  logic [3:0] a4, b4;
  logic [7:0] a8, b8;
  logic       busy4, done4, eq4, ag4, bg4;
  logic       busy8, done8, eq8, ag8, bg8;
  int checks = 0, failures = 0;

  qca_comparator #(.N(4), .DW(DW)) dut4 (
    .clk, .rst_n, .start(start4), .a(a4), .b(b4),
    .busy(busy4), .done(done4), .aeqb(eq4), .abigb(ag4), .bbiga(bg4));
  qca_comparator #(.N(8), .DW(DW)) dut8 (
    .clk, .rst_n, .start(start8), .a(a8), .b(b8),
    .busy(busy8), .done(done8), .aeqb(eq8), .abigb(ag8), .bbiga(bg8));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int want_edges(int n, int x, int y);
    for (int i = n - 1; i >= 0; i--)
      if (((x >> i) & 1) != ((y >> i) & 1)) return DW * ((n - 1 - i) / DW + 1) + 1;
    return n + 1;
  endfunction

  initial begin
    int edges;
    start4 = 1'b0; start8 = 1'b0; a4 = '0; b4 = '0; a8 = '0; b8 = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int x = 0; x < 16; x++)
      for (int y = 0; y < 16; y++) begin
        @(negedge clk);
        a4 = 4'(x); b4 = 4'(y); start4 = 1'b1;
        @(negedge clk);
        start4 = 1'b0;
        edges = 0;
        while (!done4 && edges < 20) begin @(negedge clk); edges++; end
        checks++;
        if (edges != want_edges(4, x, y) || eq4 !== (x == y) || ag4 !== (x > y) || bg4 !== (y > x)) begin
          failures++;
          $display("FAIL N=4 a=%0d b=%0d edges=%0d eq=%b ag=%b bg=%b", x, y, edges, eq4, ag4, bg4);
        end
      end
    for (int x = 0; x < 256; x++)
      for (int y = 0; y < 256; y++) begin
        @(negedge clk);
        a8 = 8'(x); b8 = 8'(y); start8 = 1'b1;
        @(negedge clk);
        start8 = 1'b0;
        edges = 0;
        while (!done8 && edges < 40) begin @(negedge clk); edges++; end
        checks++;
        if (edges != want_edges(8, x, y) || eq8 !== (x == y) || ag8 !== (x > y) || bg8 !== (y > x)) begin
          failures++;
          if (failures < 20)
            $display("FAIL N=8 a=%0d b=%0d edges=%0d eq=%b ag=%b bg=%b", x, y, edges, eq8, ag8, bg8);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
