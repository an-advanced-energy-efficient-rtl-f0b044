// logic_unit: bitwise operations of the ALU.
//
// Computes AND, OR, XOR, NOT (of A) and XNOR in parallel and hands all five
// to the output multiplexer, in opcode order. XNOR reuses the XOR result
// through an inverter rather than a gate of its own. AND/OR/XOR/NOT are the
// operations the published design names for this unit; XNOR is the fifth
// one, taken from its elaborated circuit. Purely combinational.
module logic_unit
  import alu_pkg::*;
#(
  parameter int unsigned WIDTH = 8
) (
  input  logic [WIDTH-1:0]              a,
  input  logic [WIDTH-1:0]              b,
  output logic [N_LOGIC-1:0][WIDTH-1:0] res   // [0]=AND [1]=OR [2]=XOR [3]=NOT [4]=XNOR
);
  logic [WIDTH-1:0] x;

  always_comb begin
    x      = a ^ b;
    res[0] = a & b;
    res[1] = a | b;
    res[2] = x;
    res[3] = ~a;
    res[4] = ~x;
  end
endmodule
