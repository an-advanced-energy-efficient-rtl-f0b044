// tb_carry4: exhaustive check of the 4-bit carry-chain group, including every
// intermediate carry output.
module tb_carry4;
  logic [3:0] a, b, o, co;
  logic       ci;
  int checks = 0, failures = 0;

  carry4 dut (.a, .b, .ci, .o, .co);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 512; i++) begin
      logic [3:0] exp_co;
      int total;
      {ci, a, b} = 9'(i);
      total = int'(a) + int'(b) + int'(ci);
      // carry out of bit k = carry out of the (k+1)-bit sum of the low bits
      for (int k = 0; k < 4; k++) begin
        int m;
        m = (1 << (k + 1)) - 1;
        exp_co[k] = ((int'(a) & m) + (int'(b) & m) + int'(ci)) > m;
      end
      #1;
      checks++;
      if (o !== total[3:0] || co !== exp_co) begin
        failures++;
        $display("FAIL a=%h b=%h ci=%0b -> o=%h co=%b (exp %h %b)", a, b, ci, o, co, total[3:0], exp_co);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
