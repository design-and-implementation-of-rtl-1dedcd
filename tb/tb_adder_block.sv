// tb_adder_block: exhaustive check of the carry-based greater-than decision
// for every unequal pair of 2-bit digits (the default) and of 4-bit digits,
// against integer comparison; and that both outputs stay low when not valid.
module tb_adder_block;
  logic       v2, v4;
  logic [1:0] a2, b2;
  logic [3:0] a4, b4;
  logic       bg2, ag2, bg4, ag4;
  int checks = 0, failures = 0;

  adder_block dut2 (.valid(v2), .a_digit(a2), .b_digit(b2), .bbiga(bg2), .abigb(ag2));
  adder_block #(.DW(4)) dut4 (.valid(v4), .a_digit(a4), .b_digit(b4), .bbiga(bg4), .abigb(ag4));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) begin
        a2 = 2'(i); b2 = 2'(j);
        v2 = 1'b0; #1;
        checks++;
        if (bg2 !== 1'b0 || ag2 !== 1'b0) failures++;
        if (i != j) begin
          v2 = 1'b1; #1;
          checks++;
          if (bg2 !== (j > i) || ag2 !== (i > j)) begin
            failures++;
            $display("FAIL DW=2 a=%0d b=%0d bbiga=%b abigb=%b", i, j, bg2, ag2);
          end
        end
      end
    v4 = 1'b1;
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++) begin
        if (i == j) continue;
        a4 = 4'(i); b4 = 4'(j); #1;
        checks++;
        if (bg4 !== (j > i) || ag4 !== (i > j)) begin
          failures++;
          $display("FAIL DW=4 a=%0d b=%0d bbiga=%b abigb=%b", i, j, bg4, ag4);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
