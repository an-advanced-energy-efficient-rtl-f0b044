// tb_hybrid_fa: exhaustive truth-table check of the one-bit hybrid full adder.
module tb_hybrid_fa;
  logic a, b, cin, sum, cout;
  int checks = 0, failures = 0;

  hybrid_fa dut (.a, .b, .cin, .sum, .cout);

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      int total;
      {a, b, cin} = 3'(i);
      total = int'(a) + int'(b) + int'(cin);
      #1;
      checks++;
      if (sum !== total[0] || cout !== total[1]) begin
        failures++;
        $display("FAIL a=%0b b=%0b cin=%0b -> sum=%0b cout=%0b", a, b, cin, sum, cout);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
