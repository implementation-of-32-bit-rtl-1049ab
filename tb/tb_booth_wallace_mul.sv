// tb_booth_wallace_mul: compares the 64-bit product of booth_wallace_mul with
// the simulator's signed multiplication for corner operands and random ones,
// and exhaustively for an 8 x 8 instance.
module tb_booth_wallace_mul;
  timeunit 1ns; timeprecision 1ps;

  int checks = 0, failures = 0;

  logic [31:0] x, y;  logic [63:0] p;
  logic [7:0]  xs, ys; logic [15:0] ps;

  booth_wallace_mul #(.W(32)) dut  (.x(x),  .y(y),  .p(p));
  booth_wallace_mul #(.W(8))  dut8 (.x(xs), .y(ys), .p(ps));

  task automatic check(input logic [31:0] xv, input logic [31:0] yv);
    logic [63:0] ref_v;
    x = xv; y = yv; #1;
    ref_v = 64'($signed(xv)) * 64'($signed(yv));
    checks++;
    if (p !== ref_v) begin
      failures++;
      $display("FAIL: %h * %h = %h expected %h", xv, yv, p, ref_v);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("TIMEOUT");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(0, 32'h1234_5678);
    check(1, 1);
    check('1, '1);
    check('1, 1);
    check(32'h8000_0000, 32'h8000_0000);
    check(32'h8000_0000, '1);
    check(32'h7FFF_FFFF, 32'h7FFF_FFFF);
    check(32'h1111_1111, 32'h2222_2222);
    for (int i = 0; i < 3000; i++) check($urandom, $urandom);
    for (int a = 0; a < 256; a++)
      for (int b = 0; b < 256; b++) begin
        xs = 8'(a); ys = 8'(b); #1;
        checks++;
        if (ps !== 16'($signed(8'(a)) * $signed(8'(b)))) failures++;
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
