// shift_unit: one-bit shifts of operand A.
//
// Presents three results to the output multiplexer, in opcode order:
// logical left (zero fill), logical right (zero fill) and arithmetic right
// (the sign bit is copied). The shifted-out bit is dropped. The published
// design names logical and arithmetic shifts; the one-bit distance and this
// set of three are this design's choice. Purely combinational.
module shift_unit
  import alu_pkg::*;
#(
  parameter int unsigned WIDTH = 8
) (
  input  logic [WIDTH-1:0]              a,
  output logic [N_SHIFT-1:0][WIDTH-1:0] res   // [0]=SHL [1]=SHR [2]=SAR
);
  always_comb begin
    res[0] = {a[WIDTH-2:0], 1'b0};
    res[1] = {1'b0, a[WIDTH-1:1]};
    res[2] = {a[WIDTH-1], a[WIDTH-1:1]};
  end
endmodule
