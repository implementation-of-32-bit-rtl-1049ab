// tb_bch_encoder: feeds random 30-bit words serially into bch_encoder (the
// default BCH(63,30) code correcting 6 errors) and compares the 63 code bits
// with a reference systematic encoding by the tabulated generator polynomial.
// Checks the one-clock latency, that a full-rate word occupies exactly 63
// consecutive output clocks, that busy covers the 33 parity clocks, and that
// gaps in vdin are tolerated.
module tb_bch_encoder;
  timeunit 1ns; timeprecision 1ps;
  import bch_ref_pkg::*;

  localparam int K = 30, P = P63_T6, N = K + P;

  int checks = 0, failures = 0;

  logic clk = 0, reset = 1, din = 0, vdin = 0;
  logic dout, vdout, busy;

  bch_encoder dut (.clk(clk), .reset(reset), .din(din), .vdin(vdin), .dout(dout), .vdout(vdout), .busy(busy));

  always #5 clk = ~clk;

  int cyc = 0;
  always @(posedge clk) cyc++;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TIMEOUT");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Collect the output stream.
  logic [N-1:0] got;
  int           nout = 0, first_cyc = 0, last_cyc = 0, busy_cycles = 0;
  always @(posedge clk) begin
    if (vdout) begin
      if (nout == 0) first_cyc = cyc;
      got      = {got[N-2:0], dout};
      nout++;
      last_cyc = cyc;
    end
    if (busy) busy_cycles++;
  end

  task automatic send_word(input logic [K-1:0] data, input bit gaps);
    logic [127:0] ref_v;
    nout = 0; busy_cycles = 0;
    for (int i = K - 1; i >= 0; i--) begin
      if (gaps && ($urandom % 3 == 0)) begin
        @(negedge clk); vdin = 0;
      end
      @(negedge clk); din = data[i]; vdin = 1;
    end
    @(negedge clk); vdin = 0; din = 0;
    repeat (N + 5) @(negedge clk);
    ref_v = ref_encode(128'(data), K, P, G63_T6);
    checks++;
    if (nout != N) begin failures++; $display("FAIL: %0d output bits, expected %0d", nout, N); end
    checks++;
    if (got !== ref_v[N-1:0]) begin
      failures++;
      $display("FAIL: data %h code %h expected %h", data, got, ref_v[N-1:0]);
    end
    checks++;
    if (busy_cycles != P) begin failures++; $display("FAIL: busy %0d clocks, expected %0d", busy_cycles, P); end
    if (!gaps) begin
      checks++;
      if (last_cyc - first_cyc + 1 != N) begin
        failures++;
        $display("FAIL: word took %0d clocks, expected %0d", last_cyc - first_cyc + 1, N);
      end
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    reset = 0;
    send_word('0, 0);
    send_word('1, 0);
    send_word(30'h2BCD_EFDD, 0);
    for (int i = 0; i < 40; i++) send_word(K'($urandom), (i % 2) == 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
