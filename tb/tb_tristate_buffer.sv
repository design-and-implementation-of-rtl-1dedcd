// tb_tristate_buffer: random digits with the enable on and off; the data must
// pass unchanged and `valid` be high only when enabled, and the outputs must be
// released (all zero, valid low) otherwise.
module tb_tristate_buffer;
  logic       en, valid;
  logic [1:0] ai, bi, ao, bo;
  int checks = 0, failures = 0;

  tristate_buffer dut (.en, .a_in(ai), .b_in(bi), .a_out(ao), .b_out(bo), .valid);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 200; n++) begin
      en = 1'($urandom);
      ai = 2'($urandom);
      bi = 2'($urandom);
      #1;
      checks++;
      if (en) begin
        if (ao !== ai || bo !== bi || valid !== 1'b1) begin
          failures++; $display("FAIL enabled %b %b -> %b %b", ai, bi, ao, bo);
        end
      end else if (ao !== 2'b00 || bo !== 2'b00 || valid !== 1'b0) begin
        failures++; $display("FAIL released %b %b -> %b %b", ai, bi, ao, bo);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
