// alu32: combinational W-bit arithmetic and logic unit (W = 32 by default).
//
// Arithmetic: ADD and SUB share one sklansky_adder; SUB feeds ~b with a carry
// in of 1 (two's complement a - b). cout is that adder's carry out (for SUB it
// is 1 when no borrow occurs) and is 0 for the other operations. MUL returns
// the low W bits of the signed product from booth_wallace_mul (radix-4 Booth,
// Wallace tree, Sklansky carry-propagate adder); the low half is the same for
// signed and unsigned operands. Logic: AND, OR, XOR, NOT a. Shift: a shifted
// by b[4:0] places, to the left when b[5] = 0, logically to the right when
// b[5] = 1 (for W = 32; in general the amount is the low log2(W) bits of b and
// the direction the next bit).
//
// The operation list, the 3-bit opcode with 000 = ADD, the Sklansky adder and
// the Booth/Wallace multiplier follow the source description. The other opcode
// values, the shift operand format and the carry output are this design's.
module alu32
  import alu_pkg::*;
#(
  parameter int W = 32
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  alu_op_e      opcode,
  output logic [W-1:0] y,
  output logic         cout
);

  localparam int SW = $clog2(W);

  logic         is_sub;
  logic [W-1:0] add_b, add_sum;
  logic         add_cout;
  logic [2*W-1:0] prod;

  assign is_sub = (opcode == OP_SUB);
  assign add_b  = is_sub ? ~b : b;

  sklansky_adder #(.W(W)) u_add (
    .a    (a),
    .b    (add_b),
    .cin  (is_sub),
    .sum  (add_sum),
    .cout (add_cout)
  );

  booth_wallace_mul #(.W(W)) u_mul (
    .x (a),
    .y (b),
    .p (prod)
  );

  logic [SW-1:0] shamt;
  logic          shright;
  assign shamt   = b[SW-1:0];
  assign shright = b[SW];

  always_comb begin
    cout = 1'b0;
    unique case (opcode)
      OP_ADD:   begin y = add_sum; cout = add_cout; end
      OP_SUB:   begin y = add_sum; cout = add_cout; end
      OP_MUL:   y = prod[W-1:0];
      OP_AND:   y = a & b;
      OP_OR:    y = a | b;
      OP_XOR:   y = a ^ b;
      OP_NOT:   y = ~a;
      OP_SHIFT: y = shright ? (a >> shamt) : (a << shamt);
      default:  y = '0;
    endcase
  end

endmodule
