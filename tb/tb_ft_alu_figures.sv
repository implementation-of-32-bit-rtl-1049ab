// tb_ft_alu_figures: replays the reference scenarios of the fault-tolerant
// ALU with their exact error patterns, at the default size (32-bit operands,
// 74-bit code words, 6 correctable errors). Each pattern is a 64-bit value
// zero-extended to the 74-bit error input, so its ones fall on the parity end
// of the code word (bit i flips the coefficient of x^i).
//   1. Operand ABCDEFDDh with error 1100000000000011h (4 bits): corrected.
//   2. Operand ABCDEFDDh with error 0000000111111111h (9 bits): beyond the
//      code, so the word must be flagged or come out different.
//   3. ADD 11111111h + 22222222h with errorb 0, 0000000011001111h (6 bits)
//      and 0000000001111111h (7 bits): 33333333h for the first two, flagged or
//      different for the third.
// The operand goes through input a with opcode OR and b = 0, so dout = a.
module tb_ft_alu_figures;
  timeunit 1ns; timeprecision 1ps;

  localparam int W = 32, N = 74;

  int checks = 0, failures = 0;

  logic         clk = 0, rst = 1, vdin = 0;
  logic [W-1:0] a = '0, b = '0;
  logic [2:0]   opcode = '0;
  logic [N-1:0] errora = '0, errorb = '0;
  logic [W-1:0] dout, douta, doutb;
  logic         vdout, wrong, wronga, wrongb, busy;

  ft_alu dut (.clk(clk), .rst(rst), .a(a), .b(b), .opcode(opcode), .errora(errora), .errorb(errorb),
              .vdin(vdin), .dout(dout), .vdout(vdout), .wrong(wrong), .douta(douta), .doutb(doutb),
              .wronga(wronga), .wrongb(wrongb), .busy(busy));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TIMEOUT");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic [W-1:0] x, input logic [W-1:0] z, input logic [2:0] o,
                     input logic [63:0] ea, input logic [63:0] eb);
    @(negedge clk); a = x; b = z; opcode = o; errora = N'(ea); errorb = N'(eb); vdin = 1;
    @(negedge clk); vdin = 0;
    while (!vdout) @(negedge clk);
    $display("a=%h b=%h op=%b errora=%h errorb=%h -> dout=%h wrong=%b", x, z, o, ea, eb, dout, wrong);
  endtask

  task automatic expect_ok(input logic [W-1:0] want);
    checks++;
    if (dout !== want || wrong) begin
      failures++;
      $display("FAIL: dout %h wrong %b, expected %h", dout, wrong, want);
    end
  endtask

  task automatic expect_not_silent(input logic [W-1:0] clean);
    checks++;
    if (dout === clean && !wrong) begin
      failures++;
      $display("FAIL: uncorrectable pattern neither flagged nor visible");
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    run(32'hABCD_EFDD, '0, 3'b100, 64'h1100_0000_0000_0011, '0);
    expect_ok(32'hABCD_EFDD);
    run(32'hABCD_EFDD, '0, 3'b100, 64'h0000_0001_1111_1111, '0);
    expect_not_silent(32'hABCD_EFDD);
    run(32'h1111_1111, 32'h2222_2222, 3'b000, '0, '0);
    expect_ok(32'h3333_3333);
    run(32'h1111_1111, 32'h2222_2222, 3'b000, '0, 64'h0000_0000_1100_1111);
    expect_ok(32'h3333_3333);
    run(32'h1111_1111, 32'h2222_2222, 3'b000, '0, 64'h0000_0000_0111_1111);
    expect_not_silent(32'h3333_3333);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
