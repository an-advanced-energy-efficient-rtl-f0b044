// tb_arith_unit: exhaustive check of the eight arithmetic operations against
// the golden model (result, carry, and overflow formed as C8 xor C7).
module tb_arith_unit;
  import alu_ref_pkg::*;
  logic [7:0] a, b, sum;
  logic [2:0] op;
  logic       cout, c_msb;
  int checks = 0, failures = 0;

  arith_unit dut (.a, .b, .op, .sum, .cout, .c_msb);

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8 * 65536; i++) begin
      alu_out_t e;
      {op, a, b} = 19'(i);
      e = alu_ref({1'b0, op}, a, b);
      #1;
      checks++;
      // pass-through operations report the raw adder carries (0 for A+0 and 0+B)
      if (sum !== e.result || cout !== e.c || (cout ^ c_msb) !== e.v) begin
        failures++;
        if (failures < 10)
          $display("FAIL op=%0d a=%h b=%h -> %h c=%0b v=%0b (exp %h %0b %0b)",
                   op, a, b, sum, cout, cout ^ c_msb, e.result, e.c, e.v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
