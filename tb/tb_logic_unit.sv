// tb_logic_unit: exhaustive check of AND, OR, XOR, NOT and XNOR.
module tb_logic_unit;
  logic [7:0] a, b;
  logic [4:0][7:0] res;
  int checks = 0, failures = 0;

  logic_unit dut (.a, .b, .res);

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 65536; i++) begin
      logic [4:0][7:0] e;
      {a, b} = 16'(i);
      // bit by bit from truth tables
      for (int k = 0; k < 8; k++) begin
        e[0][k] = a[k] && b[k];
        e[1][k] = a[k] || b[k];
        e[2][k] = a[k] != b[k];
        e[3][k] = !a[k];
        e[4][k] = a[k] == b[k];
      end
      #1;
      checks++;
      if (res !== e) begin
        failures++;
        if (failures < 10) $display("FAIL a=%h b=%h res=%h exp=%h", a, b, res, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
