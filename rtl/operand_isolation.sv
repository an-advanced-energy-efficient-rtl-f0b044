// operand_isolation: per-unit operand gating ahead of the three datapaths.
//
// The opcode is decoded into one enable per unit (arithmetic: opcode[3]=0;
// logic: AND..XNOR; shift: SHL..SAR). Each unit's operands are ANDed with its
// enable, so only the selected unit sees the live operands; the idle units'
// inputs sit at zero and their internal nodes stop toggling while the
// operands change. Gating the arithmetic unit is what the published design
// describes; gating the logic and shift units too follows its block diagram,
// where the isolation stage feeds all three. Holding idle inputs at zero
// (rather than latching the last value) is this design's choice and keeps
// the datapath free of storage. Purely combinational; the AND gates sit
// outside the carry chain.
module operand_isolation
  import alu_pkg::*;
#(
  parameter int unsigned WIDTH = 8
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic [3:0]       opcode,
  output logic [WIDTH-1:0] arith_a,
  output logic [WIDTH-1:0] arith_b,
  output logic [WIDTH-1:0] logic_a,
  output logic [WIDTH-1:0] logic_b,
  output logic [WIDTH-1:0] shift_a,
  output logic             arith_en   // arithmetic operation selected
);
  logic logic_en, shift_en;

  always_comb begin
    arith_en = is_arith(opcode);
    logic_en = is_logic(opcode);
    shift_en = is_shift(opcode);

    arith_a = a & {WIDTH{arith_en}};
    arith_b = b & {WIDTH{arith_en}};
    logic_a = a & {WIDTH{logic_en}};
    logic_b = b & {WIDTH{logic_en}};
    shift_a = a & {WIDTH{shift_en}};
  end

  // Exactly one unit is enabled for every opcode.
  always_comb assert ($onehot({arith_en, logic_en, shift_en}))
    else $error("operand_isolation: unit enables not one-hot");
endmodule
