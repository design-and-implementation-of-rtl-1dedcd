// tb_maj3: exhaustive check of the three-input majority gate against a count
// of the inputs that are 1 (output 1 when at least two are), plus the AND and
// OR behaviour obtained by fixing one input.
module tb_maj3;
  logic a, b, c, y;
  int checks = 0, failures = 0;

  maj3 dut (.a, .b, .c, .y);

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      #1;
      checks++;
      if (y !== (int'(a) + int'(b) + int'(c) >= 2)) begin
        failures++;
        $display("FAIL maj3(%b,%b,%b) = %b", a, b, c, y);
      end
      // c fixed to 0 gives AND, to 1 gives OR
      checks++;
      if (c == 1'b0 && y !== (a && b)) failures++;
      if (c == 1'b1 && y !== (a || b)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
