// tb_precomp_unit: exhaustive check of the digit equality stage for the
// default 2-bit digit and for a 4-bit digit: `s` must be 1 exactly when the
// digits differ, and `diff` must flag the differing bit positions.
module tb_precomp_unit;
  logic [1:0] a2, b2, d2;
  logic [3:0] a4, b4, d4;
  logic       s2, s4;
  int checks = 0, failures = 0;

  precomp_unit dut2 (.a_digit(a2), .b_digit(b2), .diff(d2), .s(s2));
  precomp_unit #(.DW(4)) dut4 (.a_digit(a4), .b_digit(b4), .diff(d4), .s(s4));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) begin
        a2 = 2'(i); b2 = 2'(j); #1;
        checks++;
        if (s2 !== (i != j)) begin failures++; $display("FAIL s2 %0d %0d", i, j); end
        for (int k = 0; k < 2; k++) begin
          checks++;
          if (d2[k] !== (((i >> k) & 1) != ((j >> k) & 1))) failures++;
        end
      end
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++) begin
        a4 = 4'(i); b4 = 4'(j); #1;
        checks++;
        if (s4 !== (i != j)) begin failures++; $display("FAIL s4 %0d %0d", i, j); end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
