// tb_flag_logic: exhaustive check of the Z/C/V/N rules over every result word
// and every combination of the arithmetic-select and carry inputs.
module tb_flag_logic;
  logic [7:0] result;
  logic       arith, cout, c_msb, zero, carry, overflow, sign;
  int checks = 0, failures = 0;

  flag_logic dut (.result, .arith, .cout, .c_msb, .zero, .carry, .overflow, .sign);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2048; i++) begin
      logic ez, ec, ev, en;
      {arith, cout, c_msb, result} = 11'(i);
      ez = (i % 256) == 0;
      en = (i % 256) >= 128;
      ec = arith ? cout : 1'b0;
      ev = arith ? (cout != c_msb) : 1'b0;
      #1;
      checks++;
      if ({zero, carry, overflow, sign} !== {ez, ec, ev, en}) begin
        failures++;
        if (failures < 10)
          $display("FAIL r=%h arith=%0b c8=%0b c7=%0b -> ZCVN=%b exp %b",
                   result, arith, cout, c_msb, {zero, carry, overflow, sign}, {ez, ec, ev, en});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
