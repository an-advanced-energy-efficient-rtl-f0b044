// flag_logic: Zero, Carry, Overflow and Sign status flags.
//
//   Z = result is all zeros                 (every operation)
//   N = most significant result bit         (every operation)
//   C = carry out of the adder's MSB stage  (arithmetic operations, else 0)
//   V = C8 xor C7, the carries out of and into the MSB stage
//                                            (arithmetic operations, else 0)
// The four definitions follow the published design. Forcing C and V to 0
// for logic and shift operations is this design's reading of its elaborated
// circuit, whose carry multiplexer outputs 0 for non-adder operations.
// Purely combinational.
module flag_logic #(
  parameter int unsigned WIDTH = 8
) (
  input  logic [WIDTH-1:0] result,
  input  logic             arith,   // an arithmetic operation is selected
  input  logic             cout,    // C8
  input  logic             c_msb,   // C7
  output logic             zero,
  output logic             carry,
  output logic             overflow,
  output logic             sign
);
  always_comb begin
    zero     = (result == '0);
    sign     = result[WIDTH-1];
    carry    = arith & cout;
    overflow = arith & (cout ^ c_msb);
  end
endmodule
