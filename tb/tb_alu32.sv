// tb_alu32: drives every opcode of alu32 with corner and random operands and
// compares the result (and the adder carry for ADD/SUB) with a reference
// computed by the simulator's own operators.
module tb_alu32;
  timeunit 1ns; timeprecision 1ps;
  import alu_pkg::*;

  int checks = 0, failures = 0;
  int per_op [8];

  logic [31:0] a, b, y;
  alu_op_e     op;
  logic        cout;

  alu32 dut (.a(a), .b(b), .opcode(op), .y(y), .cout(cout));

  function automatic logic [32:0] model(input logic [31:0] x, input logic [31:0] z, input alu_op_e o);
    case (o)
      OP_ADD:   return {1'b0, x} + {1'b0, z};
      OP_SUB:   return {1'b0, x} + {1'b0, ~z} + 33'd1;
      OP_MUL:   return {1'b0, 32'(x * z)};
      OP_AND:   return {1'b0, x & z};
      OP_OR:    return {1'b0, x | z};
      OP_XOR:   return {1'b0, x ^ z};
      OP_NOT:   return {1'b0, ~x};
      default:  return {1'b0, z[5] ? (x >> z[4:0]) : (x << z[4:0])};
    endcase
  endfunction

  task automatic check(input logic [31:0] x, input logic [31:0] z, input alu_op_e o);
    logic [32:0] ref_v;
    a = x; b = z; op = o; #1;
    ref_v = model(x, z, o);
    checks++;
    per_op[int'(o)]++;
    if ({cout, y} !== ref_v) begin
      failures++;
      $display("FAIL op %s: a=%h b=%h -> %b_%h expected %h", o.name(), x, z, cout, y, ref_v);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TIMEOUT");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) per_op[i] = 0;
    check(32'h1111_1111, 32'h2222_2222, OP_ADD);  // expected 33333333
    check('1, 32'd1, OP_ADD);
    check(32'd5, 32'd7, OP_SUB);
    check(32'd7, 32'd5, OP_SUB);
    check(32'hFFFF_FFFF, 32'hFFFF_FFFF, OP_MUL);
    check(32'h8000_0001, 32'd33, OP_SHIFT);       // right by 1
    check(32'h8000_0001, 32'd31, OP_SHIFT);       // left by 31
    for (int i = 0; i < 4000; i++) check($urandom, $urandom, alu_op_e'(i % 8));
    for (int i = 0; i < 8; i++) begin
      checks++;
      if (per_op[i] == 0) begin failures++; $display("FAIL: opcode %0d never tested", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
