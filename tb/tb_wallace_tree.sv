// tb_wallace_tree: checks that the two output rows of wallace_tree add up,
// modulo 2^W, to the sum of all input rows, for the multiplier's size (17 rows
// of 64 bits) and for small row counts (3, 4 and 5 rows of 16 bits), with
// random rows and with all-ones rows that make every carry fire.
module tb_wallace_tree;
  timeunit 1ns; timeprecision 1ps;

  int checks = 0, failures = 0;

  logic [16:0][63:0] rows;  logic [63:0] s, c;
  logic [2:0][15:0]  r3;    logic [15:0] s3, c3;
  logic [3:0][15:0]  r4;    logic [15:0] s4, c4;
  logic [4:0][15:0]  r5;    logic [15:0] s5, c5;

  wallace_tree #(.ROWS(17), .W(64)) dut   (.rows(rows), .sum_row(s),  .carry_row(c));
  wallace_tree #(.ROWS(3),  .W(16)) dut3  (.rows(r3),   .sum_row(s3), .carry_row(c3));
  wallace_tree #(.ROWS(4),  .W(16)) dut4  (.rows(r4),   .sum_row(s4), .carry_row(c4));
  wallace_tree #(.ROWS(5),  .W(16)) dut5  (.rows(r5),   .sum_row(s5), .carry_row(c5));

  initial begin
    #100000;
    failures++;
    $display("TIMEOUT");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 1500; t++) begin
      logic [63:0] ref_v;
      logic [15:0] ref3, ref4, ref5;
      ref_v = '0; ref3 = '0; ref4 = '0; ref5 = '0;
      for (int r = 0; r < 17; r++) begin
        rows[r] = (t < 5) ? '1 : {$urandom, $urandom};
        ref_v += rows[r];
      end
      for (int r = 0; r < 3; r++) begin r3[r] = (t < 5) ? '1 : 16'($urandom); ref3 += r3[r]; end
      for (int r = 0; r < 4; r++) begin r4[r] = 16'($urandom); ref4 += r4[r]; end
      for (int r = 0; r < 5; r++) begin r5[r] = 16'($urandom); ref5 += r5[r]; end
      #1;
      checks += 4;
      if (s + c !== ref_v) begin failures++; $display("FAIL 17 rows: %h + %h != %h", s, c, ref_v); end
      if (16'(s3 + c3) !== ref3) begin failures++; $display("FAIL 3 rows"); end
      if (16'(s4 + c4) !== ref4) begin failures++; $display("FAIL 4 rows"); end
      if (16'(s5 + c5) !== ref5) begin failures++; $display("FAIL 5 rows"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
