// tb_operand_isolation: for every opcode and random operands, checks that only
// the selected unit receives the operands and the others see zero.
module tb_operand_isolation;
  logic [7:0] a, b, arith_a, arith_b, logic_a, logic_b, shift_a;
  logic [3:0] opcode;
  logic       arith_en;
  int checks = 0, failures = 0;

  operand_isolation dut (
    .a, .b, .opcode, .arith_a, .arith_b, .logic_a, .logic_b, .shift_a, .arith_en
  );

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int round = 0; round < 500; round++) begin
      for (int op = 0; op < 16; op++) begin
        logic ea, el, es;
        opcode = 4'(op);
        a = 8'($urandom);
        b = 8'($urandom);
        ea = op < 8;
        el = op >= 8 && op <= 12;
        es = op >= 13;
        #1;
        checks++;
        if (arith_en !== ea ||
            arith_a !== (ea ? a : 8'h00) || arith_b !== (ea ? b : 8'h00) ||
            logic_a !== (el ? a : 8'h00) || logic_b !== (el ? b : 8'h00) ||
            shift_a !== (es ? a : 8'h00)) begin
          failures++;
          if (failures < 10)
            $display("FAIL op=%h a=%h b=%h -> ar %h/%h lg %h/%h sh %h en=%0b",
                     opcode, a, b, arith_a, arith_b, logic_a, logic_b, shift_a, arith_en);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
