// output_mux16: the 16-to-1 result multiplexer.
//
// One WIDTH-bit input per opcode; the 4-bit opcode routes the matching input
// to the result bus. Purely combinational.
module output_mux16 #(
  parameter int unsigned WIDTH = 8
) (
  input  logic [15:0][WIDTH-1:0] in_data,
  input  logic [3:0]             sel,
  output logic [WIDTH-1:0]       out_data
);
  always_comb out_data = in_data[sel];
endmodule
