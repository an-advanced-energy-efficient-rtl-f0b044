// alu8_top: energy-efficient, compact 8-bit ALU (purely combinational).
//
// Datapath: A and B enter the operand isolation stage, which forwards them
// only to the unit the opcode selects (arithmetic, logic or shift) and holds
// the other units' inputs at zero. The arithmetic unit runs all eight
// arithmetic operations on one shared ripple-carry adder built from hybrid
// full adders grouped in two 4-bit carry-chain blocks. The 16:1 output
// multiplexer picks the result by opcode, and the flag logic derives Z, C,
// V and N. There are no storage elements: outputs settle one combinational
// delay after the inputs, so with registers around it an operation takes a
// single clock cycle.
//
// Interface: a, b (WIDTH bits), opcode (alu_pkg::opcode_e) -> result,
// zero, carry, overflow, sign. Structure and flag definitions follow the
// published design; the opcode encoding and operation list are this
// design's own (see alu_pkg).
module alu8_top
  import alu_pkg::*;
#(
  parameter int unsigned WIDTH = 8
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic [3:0]       opcode,
  output logic [WIDTH-1:0] result,
  output logic             zero,
  output logic             carry,
  output logic             overflow,
  output logic             sign
);
  logic [WIDTH-1:0] arith_a, arith_b, logic_a, logic_b, shift_a;
  logic             arith_en;

  logic [WIDTH-1:0]              arith_sum;
  logic                          arith_cout, arith_c_msb;
  logic [N_LOGIC-1:0][WIDTH-1:0] logic_res;
  logic [N_SHIFT-1:0][WIDTH-1:0] shift_res;
  logic [N_OPS-1:0][WIDTH-1:0]   mux_in;

  operand_isolation #(.WIDTH(WIDTH)) u_iso (
    .a, .b, .opcode,
    .arith_a, .arith_b, .logic_a, .logic_b, .shift_a,
    .arith_en
  );

  arith_unit #(.WIDTH(WIDTH)) u_arith (
    .a(arith_a), .b(arith_b), .op(opcode[2:0]),
    .sum(arith_sum), .cout(arith_cout), .c_msb(arith_c_msb)
  );

  logic_unit #(.WIDTH(WIDTH)) u_logic (.a(logic_a), .b(logic_b), .res(logic_res));

  shift_unit #(.WIDTH(WIDTH)) u_shift (.a(shift_a), .res(shift_res));

  // Mux inputs in opcode order: 0-7 the shared adder, 8-12 logic, 13-15 shift.
  always_comb begin
    for (int i = 0; i < 8; i++) mux_in[i] = arith_sum;
    for (int i = 0; i < int'(N_LOGIC); i++) mux_in[8+i] = logic_res[i];
    for (int i = 0; i < int'(N_SHIFT); i++) mux_in[8+N_LOGIC+i] = shift_res[i];
  end

  output_mux16 #(.WIDTH(WIDTH)) u_mux (.in_data(mux_in), .sel(opcode), .out_data(result));

  flag_logic #(.WIDTH(WIDTH)) u_flags (
    .result, .arith(arith_en), .cout(arith_cout), .c_msb(arith_c_msb),
    .zero, .carry, .overflow, .sign
  );
endmodule
