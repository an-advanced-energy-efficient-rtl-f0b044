// alu_pkg: opcode set and shared constants of the 8-bit low-power ALU.
//
// The ALU has sixteen operations selected by a 4-bit opcode. Bit 3 splits
// them into eight arithmetic operations (all served by one shared adder) and
// eight logical/shift operations. The exact encoding below is this design's
// own choice; the operation mix (add, subtract, increment, decrement, AND, OR,
// XOR, NOT, logical and arithmetic shifts) follows the published description.
package alu_pkg;

  typedef enum logic [3:0] {
    OP_ADD  = 4'h0,  // A + B
    OP_SUB  = 4'h1,  // A - B          (A + ~B + 1)
    OP_INC  = 4'h2,  // A + 1
    OP_DEC  = 4'h3,  // A - 1          (A + all-ones)
    OP_NEG  = 4'h4,  // -A             (~A + 1)
    OP_RSB  = 4'h5,  // B - A          (~A + B + 1)
    OP_TFA  = 4'h6,  // A              (A + 0, transfer through the adder)
    OP_TFB  = 4'h7,  // B              (0 + B, transfer through the adder)
    OP_AND  = 4'h8,
    OP_OR   = 4'h9,
    OP_XOR  = 4'hA,
    OP_NOT  = 4'hB,  // ~A
    OP_XNOR = 4'hC,
    OP_SHL  = 4'hD,  // A << 1, zero fill
    OP_SHR  = 4'hE,  // A >> 1, zero fill
    OP_SAR  = 4'hF   // A >> 1, sign fill
  } opcode_e;

  // Arithmetic operation index within the arithmetic unit (opcode[2:0]).
  typedef enum logic [2:0] {
    AR_ADD = 3'd0, AR_SUB = 3'd1, AR_INC = 3'd2, AR_DEC = 3'd3,
    AR_NEG = 3'd4, AR_RSB = 3'd5, AR_TFA = 3'd6, AR_TFB = 3'd7
  } arith_op_e;

  // Result slots of the logic and shift units, in opcode order.
  localparam int unsigned N_LOGIC = 5;  // AND, OR, XOR, NOT, XNOR
  localparam int unsigned N_SHIFT = 3;  // SHL, SHR, SAR
  localparam int unsigned N_OPS   = 16;

  localparam logic [3:0] FIRST_SHIFT_OP = OP_SHL;

  function automatic logic is_arith(input logic [3:0] op);
    return op < OP_AND;
  endfunction

  function automatic logic is_shift(input logic [3:0] op);
    return op >= FIRST_SHIFT_OP;
  endfunction

  function automatic logic is_logic(input logic [3:0] op);
    return op[3] && (op < FIRST_SHIFT_OP);
  endfunction

endpackage
