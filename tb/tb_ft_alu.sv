// tb_ft_alu: end-to-end test of the fault-tolerant ALU at its default size
// (32-bit operands, BCH code over GF(2^7) correcting 6 errors, 74-bit code
// words). It replays the reference scenario a = 11111111h, b = 22222222h,
// opcode 000 (ADD) with 0, 6 and 7 errors per operand (33333333h expected for
// 0 and 6), then runs every opcode on random operands with random error
// patterns of 0 to 9 bits per operand. Results are checked against a model of
// the ALU applied to the error-free operands whenever both operands carry at
// most 6 errors; with more, the top must flag wrong or deliver a corrupted
// operand. Also checks the 164-clock latency, that busy ignores a second
// start, and that every mechanism (correction on A and on B, uncorrectable
// detection, each opcode, ignored start) happened at least once.
module tb_ft_alu;
  timeunit 1ns; timeprecision 1ps;
  import bch_ref_pkg::*;

  localparam int W = 32, N = 74, T = 6;
  localparam int LAT = 2 * N + 2 * T + 4;

  int checks = 0, failures = 0;
  int n_corr_a = 0, n_corr_b = 0, n_flag = 0, n_ignored = 0;
  int per_op [8];

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
    repeat (400000) @(posedge clk);
    failures++;
    $display("TIMEOUT");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W-1:0] model(input logic [W-1:0] x, input logic [W-1:0] z, input logic [2:0] o);
    case (o)
      3'b000:  return x + z;
      3'b001:  return x - z;
      3'b010:  return x * z;
      3'b011:  return x & z;
      3'b100:  return x | z;
      3'b101:  return x ^ z;
      3'b110:  return ~x;
      default: return z[5] ? (x >> z[4:0]) : (x << z[4:0]);
    endcase
  endfunction

  task automatic op(input logic [W-1:0] x, input logic [W-1:0] z, input logic [2:0] o,
                    input int wa, input int wb, input bit poke);
    logic [127:0] ea, eb;
    int           n;
    ea = rand_error(N, wa);
    eb = rand_error(N, wb);
    @(negedge clk); a = x; b = z; opcode = o; errora = ea[N-1:0]; errorb = eb[N-1:0]; vdin = 1;
    @(negedge clk); vdin = 0;
    n = 0;
    while (!vdout && n <= 2 * LAT) begin
      if (poke && n == 50) begin
        a = ~x; opcode = ~o; errora = '1; vdin = 1; n_ignored++;
      end else begin
        vdin = 0;
      end
      @(negedge clk); n++;
    end
    vdin = 0;
    per_op[o]++;
    checks++;
    if (n != LAT) begin failures++; $display("FAIL: latency %0d expected %0d", n, LAT); end
    if (wa <= T && wb <= T) begin
      checks += 3;
      if (wrong || wronga || wrongb) begin failures++; $display("FAIL: flagged with %0d/%0d errors", wa, wb); end
      if (douta !== x || doutb !== z) begin failures++; $display("FAIL: operands %h %h, expected %h %h", douta, doutb, x, z); end
      if (dout !== model(x, z, o)) begin
        failures++;
        $display("FAIL: op %b a=%h b=%h (%0d/%0d errors): %h expected %h", o, x, z, wa, wb, dout, model(x, z, o));
      end
      if (wa > 0) n_corr_a++;
      if (wb > 0) n_corr_b++;
    end else begin
      checks++;
      if (!wrong && douta === x && doutb === z) begin
        failures++;
        $display("FAIL: %0d/%0d errors neither flagged nor visible", wa, wb);
      end
      if (wrong) n_flag++;
      checks++;
      if (wrong !== (wronga | wrongb)) begin failures++; $display("FAIL: wrong is not wronga|wrongb"); end
    end
  endtask

  initial begin
    for (int i = 0; i < 8; i++) per_op[i] = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    // Reference scenario: ADD 11111111h + 22222222h with 0, 6 and 7 errors.
    op(32'h1111_1111, 32'h2222_2222, 3'b000, 0, 0, 0);
    op(32'h1111_1111, 32'h2222_2222, 3'b000, 6, 6, 0);
    op(32'h1111_1111, 32'h2222_2222, 3'b000, 7, 7, 0);
    op(32'hABCD_EFDD, 32'h0000_0000, 3'b100, 4, 0, 0);
    op(32'hABCD_EFDD, 32'h0000_0000, 3'b100, 9, 0, 0);
    for (int i = 0; i < 240; i++)
      op($urandom, $urandom, 3'(i % 8), (i % 5 == 4) ? 7 + (i % 3) : i % 7,
         (i % 7 == 3) ? 8 : (i / 8) % 7, (i % 23) == 5);
    for (int i = 0; i < 8; i++) begin
      checks++;
      if (per_op[i] == 0) begin failures++; $display("FAIL: opcode %0d never run", i); end
    end
    checks++;
    if (n_corr_a == 0 || n_corr_b == 0 || n_flag == 0 || n_ignored == 0) begin
      failures++;
      $display("FAIL: a mechanism never happened");
    end
    $display("corrected A=%0d corrected B=%0d flagged=%0d ignored starts=%0d", n_corr_a, n_corr_b, n_flag, n_ignored);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
