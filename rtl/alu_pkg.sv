// alu_pkg: operation codes of the 32-bit ALU.
//
// The opcode is 3 bits wide and 3'b000 is ADD, as in the source description.
// The assignment of the other seven codes is this design's: every operation
// the description lists (add, subtract, multiply, AND, OR, XOR, NOT, shift
// left and right) has a code, with both shift directions sharing one code.
package alu_pkg;

  typedef enum logic [2:0] {
    OP_ADD   = 3'b000,  // a + b
    OP_SUB   = 3'b001,  // a - b
    OP_MUL   = 3'b010,  // low W bits of a * b
    OP_AND   = 3'b011,  // a & b
    OP_OR    = 3'b100,  // a | b
    OP_XOR   = 3'b101,  // a ^ b
    OP_NOT   = 3'b110,  // ~a
    OP_SHIFT = 3'b111   // a shifted by b[4:0]: left if b[5] = 0, logical right if b[5] = 1
  } alu_op_e;

endpackage
