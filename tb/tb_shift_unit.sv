// tb_shift_unit: exhaustive check of the three one-bit shifts.
module tb_shift_unit;
  logic [7:0] a;
  logic [2:0][7:0] res;
  int checks = 0, failures = 0;

  shift_unit dut (.a, .res);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      int shl, shr, sar;
      a   = 8'(i);
      shl = (i * 2) % 256;
      shr = i / 2;
      sar = (i >= 128) ? shr + 128 : shr;
      #1;
      checks += 3;
      if (res[0] !== 8'(shl)) begin failures++; $display("FAIL SHL %h -> %h", a, res[0]); end
      if (res[1] !== 8'(shr)) begin failures++; $display("FAIL SHR %h -> %h", a, res[1]); end
      if (res[2] !== 8'(sar)) begin failures++; $display("FAIL SAR %h -> %h", a, res[2]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
