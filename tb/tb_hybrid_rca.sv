// tb_hybrid_rca: exhaustive check of the 8-bit adder (all operand pairs, both
// carry-in values): sum, carry out (C8) and carry into the MSB (C7).
module tb_hybrid_rca;
  localparam int W = 8;
  logic [W-1:0] a, b, sum;
  logic         cin, cout, c_msb;
  int checks = 0, failures = 0;

  hybrid_rca dut (.a, .b, .cin, .sum, .cout, .c_msb);

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2 ** (2 * W + 1); i++) begin
      int total, low;
      {cin, a, b} = (2 * W + 1)'(i);
      total = int'(a) + int'(b) + int'(cin);
      low   = int'(a[W-2:0]) + int'(b[W-2:0]) + int'(cin);
      #1;
      checks++;
      if (sum !== total[W-1:0] || cout !== total[W] || c_msb !== low[W-1]) begin
        failures++;
        if (failures < 10)
          $display("FAIL a=%h b=%h cin=%0b -> sum=%h cout=%0b c7=%0b", a, b, cin, sum, cout, c_msb);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
