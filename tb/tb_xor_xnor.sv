// tb_xor_xnor: exhaustive check of the complementary XOR/XNOR pair.
module tb_xor_xnor;
  logic a, b, x, xn;
  int checks = 0, failures = 0;

  xor_xnor dut (.a, .b, .x, .xn);

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      {a, b} = 2'(i);
      #1;
      checks++;
      if (x !== (a != b) || xn !== (a == b)) begin
        failures++;
        $display("FAIL a=%0b b=%0b x=%0b xn=%0b", a, b, x, xn);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
