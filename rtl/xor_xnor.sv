// xor_xnor: input stage of the hybrid full adder.
//
// Produces the complementary pair a^b and ~(a^b) from two operand bits. In
// the hybrid cell these two rails select, pass-transistor fashion, between
// the candidate Sum and Carry values, so the rest of the cell needs no further
// XOR gates. Combinational, no timing of its own.
module xor_xnor (
  input  logic a,
  input  logic b,
  output logic x,   // a XOR b  (propagate)
  output logic xn   // a XNOR b
);
  always_comb begin
    x  = a ^ b;
    xn = ~x;
  end
endmodule
