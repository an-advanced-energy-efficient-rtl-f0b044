// tb_alu8_top: end-to-end, exhaustive test of the ALU at its default size.
//
// Every one of the 16 opcodes is applied with every pair of 8-bit operands
// (1,048,576 vectors). A new vector is applied after each rising clock edge
// and the outputs are compared with the golden model at the next rising edge,
// so each operation must complete within one clock cycle. Besides result and
// Z/C/V/N, the test watches the operand isolation inside the ALU: whenever a
// unit is idle its operand inputs must be zero. Each mechanism (every opcode,
// each flag set, isolation of each of the three units) is counted, and one
// that never occurs counts as a failure.
module tb_alu8_top;
  import alu_pkg::*;
  import alu_ref_pkg::*;

  localparam int NVEC = 16 * 65536;

  logic       clk = 1'b0;
  logic [7:0] a = '0, b = '0, result;
  logic [3:0] opcode = '0;
  logic       zero, carry, overflow, sign;

  int checks = 0, failures = 0, cycles = 0;
  int op_count[16];
  int n_zero = 0, n_carry = 0, n_overflow = 0, n_sign = 0;
  int n_iso_arith = 0, n_iso_logic = 0, n_iso_shift = 0;

  alu8_top dut (.a, .b, .opcode, .result, .zero, .carry, .overflow, .sign);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    #(10 * (NVEC + 100));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_vector();
    alu_out_t e;
    logic     live;
    opcode_e  op_e;
    string    op_name;
    e       = alu_ref(opcode, a, b);
    op_e    = opcode_e'(opcode);
    op_name = op_e.name();
    checks++;
    if ({result, zero, carry, overflow, sign} !== {e.result, e.z, e.c, e.v, e.n}) begin
      failures++;
      if (failures < 10)
        $display("FAIL op=%s a=%h b=%h -> %h ZCVN=%b, expected %h ZCVN=%b",
                 op_name, a, b, result, {zero, carry, overflow, sign},
                 e.result, {e.z, e.c, e.v, e.n});
    end
    op_count[opcode]++;
    n_zero     += int'(zero);
    n_carry    += int'(carry);
    n_overflow += int'(overflow);
    n_sign     += int'(sign);

    // operand isolation: an idle unit must see zero operands
    live = (a != 0) || (b != 0);
    checks++;
    if (!is_arith(opcode) && (dut.arith_a != 0 || dut.arith_b != 0)) begin
      failures++;
      if (failures < 10) $display("FAIL arithmetic unit not isolated, op=%h", opcode);
    end else if (!is_arith(opcode) && live) n_iso_arith++;
    checks++;
    if (!is_logic(opcode) && (dut.logic_a != 0 || dut.logic_b != 0)) begin
      failures++;
      if (failures < 10) $display("FAIL logic unit not isolated, op=%h", opcode);
    end else if (!is_logic(opcode) && live) n_iso_logic++;
    checks++;
    if (!is_shift(opcode) && dut.shift_a != 0) begin
      failures++;
      if (failures < 10) $display("FAIL shift unit not isolated, op=%h", opcode);
    end else if (!is_shift(opcode) && a != 0) n_iso_shift++;
  endtask

  initial begin
    int start_cycles;
    foreach (op_count[i]) op_count[i] = 0;
    @(posedge clk);
    start_cycles = cycles;
    for (int i = 0; i < NVEC; i++) begin
      {opcode, a, b} <= 20'(i);
      @(posedge clk);
      check_vector();
    end

    // one vector per clock cycle: single-cycle operation
    checks++;
    if (cycles - start_cycles != NVEC) begin
      failures++;
      $display("FAIL took %0d cycles for %0d operations", cycles - start_cycles, NVEC);
    end

    for (int op = 0; op < 16; op++) begin
      checks++;
      if (op_count[op] == 0) begin
        failures++;
        $display("FAIL opcode %0d never exercised", op);
      end
    end
    checks += 7;
    if (n_zero == 0)      begin failures++; $display("FAIL Z flag never set"); end
    if (n_carry == 0)     begin failures++; $display("FAIL C flag never set"); end
    if (n_overflow == 0)  begin failures++; $display("FAIL V flag never set"); end
    if (n_sign == 0)      begin failures++; $display("FAIL N flag never set"); end
    if (n_iso_arith == 0) begin failures++; $display("FAIL arithmetic isolation never seen"); end
    if (n_iso_logic == 0) begin failures++; $display("FAIL logic isolation never seen"); end
    if (n_iso_shift == 0) begin failures++; $display("FAIL shift isolation never seen"); end

    $display("vectors=%0d cycles=%0d Z=%0d C=%0d V=%0d N=%0d iso(arith/logic/shift)=%0d/%0d/%0d",
             NVEC, cycles - start_cycles, n_zero, n_carry, n_overflow, n_sign,
             n_iso_arith, n_iso_logic, n_iso_shift);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
