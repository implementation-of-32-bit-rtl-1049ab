// tb_sklansky_adder: self-checking test of sklansky_adder at 32 bits and at
// 64 bits (the multiplier's carry-propagate size). Corner operands (all ones,
// carry chains through every bit, alternating patterns) and random operands
// with random carry in are compared against the + operator of the simulator.
module tb_sklansky_adder;
  timeunit 1ns; timeprecision 1ps;

  int checks = 0, failures = 0;

  logic [31:0] a32, b32, s32;  logic ci32, co32;
  logic [63:0] a64, b64, s64;  logic ci64, co64;
  logic [4:0]  a5, b5, s5;     logic ci5, co5;

  sklansky_adder #(.W(32)) dut32 (.a(a32), .b(b32), .cin(ci32), .sum(s32), .cout(co32));
  sklansky_adder #(.W(64)) dut64 (.a(a64), .b(b64), .cin(ci64), .sum(s64), .cout(co64));
  sklansky_adder #(.W(5))  dut5  (.a(a5),  .b(b5),  .cin(ci5),  .sum(s5),  .cout(co5));

  task automatic check32(input logic [31:0] x, input logic [31:0] y, input logic c);
    logic [32:0] ref_v;
    a32 = x; b32 = y; ci32 = c; #1;
    ref_v = {1'b0, x} + {1'b0, y} + 33'(c);
    checks++;
    if ({co32, s32} !== ref_v) begin
      failures++;
      $display("FAIL 32: %h + %h + %b = %h, expected %h", x, y, c, {co32, s32}, ref_v);
    end
  endtask

  task automatic check64(input logic [63:0] x, input logic [63:0] y, input logic c);
    logic [64:0] ref_v;
    a64 = x; b64 = y; ci64 = c; #1;
    ref_v = {1'b0, x} + {1'b0, y} + 65'(c);
    checks++;
    if ({co64, s64} !== ref_v) begin
      failures++;
      $display("FAIL 64: %h + %h + %b = %h, expected %h", x, y, c, {co64, s64}, ref_v);
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
    check32('0, '0, 0);
    check32('1, 32'd1, 0);
    check32('1, '0, 1);
    check32('1, '1, 1);
    check32(32'h5555_5555, 32'hAAAA_AAAA, 1);
    check32(32'h7FFF_FFFF, 32'h0000_0001, 0);
    check32(32'h1111_1111, 32'h2222_2222, 0);
    for (int i = 0; i < 32; i++) check32(32'hFFFF_FFFF >> i, 32'd1 << (31 - i), 0);
    for (int i = 0; i < 2000; i++) check32($urandom, $urandom, 1'($urandom));
    check64('1, 64'd1, 0);
    check64(64'h8000_0000_0000_0000, 64'h8000_0000_0000_0000, 1);
    for (int i = 0; i < 2000; i++) check64({$urandom, $urandom}, {$urandom, $urandom}, 1'($urandom));
    // exhaustive at a width that is not a power of two
    for (int x = 0; x < 32; x++)
      for (int y = 0; y < 32; y++)
        for (int c = 0; c < 2; c++) begin
          a5 = 5'(x); b5 = 5'(y); ci5 = 1'(c); #1;
          checks++;
          if ({co5, s5} !== 6'(x + y + c)) failures++;
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
