// tb_output_mux16: drives sixteen distinct random words and checks that every
// select value routes exactly its own input.
module tb_output_mux16;
  logic [15:0][7:0] in_data;
  logic [3:0]       sel;
  logic [7:0]       out_data;
  int checks = 0, failures = 0;

  output_mux16 dut (.in_data, .sel, .out_data);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int round = 0; round < 200; round++) begin
      // distinct words: low nibble is the index, high nibble random
      for (int k = 0; k < 16; k++) in_data[k] = {4'($urandom), 4'(k)};
      for (int s = 0; s < 16; s++) begin
        sel = 4'(s);
        #1;
        checks++;
        if (out_data !== in_data[s]) begin
          failures++;
          if (failures < 10) $display("FAIL sel=%0d out=%h exp=%h", s, out_data, in_data[s]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
