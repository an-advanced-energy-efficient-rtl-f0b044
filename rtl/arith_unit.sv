// arith_unit: the eight arithmetic operations on one shared adder.
//
// All arithmetic operations run through a single hybrid_rca. What differs
// between them is only a small shared operand network in front of it:
//   X = A, ~A or 0;  Y = B, ~B, 0 or all-ones;  carry-in 0 or 1
// giving ADD (A+B), SUB (A+~B+1), INC (A+0+1), DEC (A+FF), NEG (~A+0+1),
// RSB (~A+B+1 = B-A), TFA (A+0) and TFB (0+B). Sharing one adder and one
// inversion network across operations, instead of separate adder and
// subtractor instances, is the area measure the published design describes;
// the particular set of eight operations is this design's choice.
// Outputs: the sum, the adder carry-out (1 = no borrow for subtraction) and
// the carry into the MSB for the overflow flag. Purely combinational.
module arith_unit
  import alu_pkg::*;
#(
  parameter int unsigned WIDTH = 8
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic [2:0]       op,     // arith_op_e, opcode[2:0]
  output logic [WIDTH-1:0] sum,
  output logic             cout,
  output logic             c_msb
);
  typedef enum logic [1:0] {X_A, X_NOTA, X_ZERO} xsel_e;
  typedef enum logic [1:0] {Y_B, Y_NOTB, Y_ZERO, Y_ONES} ysel_e;

  xsel_e            xsel;
  ysel_e            ysel;
  logic             cin;
  logic [WIDTH-1:0] x, y;

  always_comb begin
    unique case (arith_op_e'(op))
      AR_ADD:  begin xsel = X_A;    ysel = Y_B;    cin = 1'b0; end
      AR_SUB:  begin xsel = X_A;    ysel = Y_NOTB; cin = 1'b1; end
      AR_INC:  begin xsel = X_A;    ysel = Y_ZERO; cin = 1'b1; end
      AR_DEC:  begin xsel = X_A;    ysel = Y_ONES; cin = 1'b0; end
      AR_NEG:  begin xsel = X_NOTA; ysel = Y_ZERO; cin = 1'b1; end
      AR_RSB:  begin xsel = X_NOTA; ysel = Y_B;    cin = 1'b1; end
      AR_TFA:  begin xsel = X_A;    ysel = Y_ZERO; cin = 1'b0; end
      default: begin xsel = X_ZERO; ysel = Y_B;    cin = 1'b0; end  // AR_TFB
    endcase

    unique case (xsel)
      X_A:     x = a;
      X_NOTA:  x = ~a;
      default: x = '0;
    endcase

    unique case (ysel)
      Y_B:     y = b;
      Y_NOTB:  y = ~b;
      Y_ZERO:  y = '0;
      default: y = '1;
    endcase
  end

  hybrid_rca #(.WIDTH(WIDTH)) u_rca (
    .a(x), .b(y), .cin(cin), .sum(sum), .cout(cout), .c_msb(c_msb)
  );
endmodule
