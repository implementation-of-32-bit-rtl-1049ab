// tb_booth_radix4_pp: checks that the W/2+1 rows produced by booth_radix4_pp
// add up, modulo 2^(2W), to the signed product x*y, and that each Booth row i
// is zero below bit 2i. Corner operands (0, 1, -1, most negative, all-ones
// patterns) and random operands are used at W = 32; W = 8 is checked
// exhaustively.
module tb_booth_radix4_pp;
  timeunit 1ns; timeprecision 1ps;

  int checks = 0, failures = 0;

  logic [31:0]         x, y;
  logic [16:0][63:0]   pp;
  logic [7:0]          xs, ys;
  logic [4:0][15:0]    pps;

  booth_radix4_pp #(.W(32)) dut   (.x(x),  .y(y),  .pp(pp));
  booth_radix4_pp #(.W(8))  dut8  (.x(xs), .y(ys), .pp(pps));

  task automatic check(input logic [31:0] xv, input logic [31:0] yv);
    logic [63:0] acc, ref_v;
    x = xv; y = yv; #1;
    acc = '0;
    for (int r = 0; r < 17; r++) acc += pp[r];
    ref_v = 64'($signed(xv)) * 64'($signed(yv));
    checks++;
    if (acc !== ref_v) begin
      failures++;
      $display("FAIL: %h * %h rows sum %h expected %h", xv, yv, acc, ref_v);
    end
    for (int r = 1; r < 16; r++) begin
      checks++;
      if ((pp[r] & ((64'd1 << (2 * r)) - 1)) != 0) begin
        failures++;
        $display("FAIL: row %0d has bits below %0d", r, 2 * r);
      end
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
    check(0, 0);
    check(1, 1);
    check('1, '1);
    check(32'h8000_0000, 32'h8000_0000);
    check(32'h8000_0000, 32'h7FFF_FFFF);
    check(32'h1111_1111, 32'h2222_2222);
    check(32'hAAAA_AAAA, 32'h5555_5555);
    for (int i = 0; i < 1000; i++) check($urandom, $urandom);
    for (int a = 0; a < 256; a++)
      for (int b = 0; b < 256; b++) begin
        logic [15:0] s;
        xs = 8'(a); ys = 8'(b); #1;
        s = '0;
        for (int r = 0; r < 5; r++) s += pps[r];
        checks++;
        if (s !== 16'($signed(8'(a)) * $signed(8'(b)))) failures++;
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
