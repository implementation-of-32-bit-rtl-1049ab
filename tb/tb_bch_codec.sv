// tb_bch_codec: parallel words with manual error patterns through bch_codec
// at its default BCH(63,30) size. Up to 6 flipped code bits anywhere in the
// 63 must be corrected (dout equal to din, wrong low); 7 or more must never
// give the original word with wrong low. Also checks that vdout comes exactly
// 2N + 2T + 3 = 141 clocks after vdin, that busy covers the whole operation
// and that a vdin while busy is ignored.
module tb_bch_codec;
  timeunit 1ns; timeprecision 1ps;
  import bch_ref_pkg::*;

  localparam int K = 30, N = 63, T = 6;
  localparam int LAT = 2 * N + 2 * T + 3;

  int checks = 0, failures = 0;
  int corrected = 0, flagged = 0, ignored_starts = 0;

  logic         clk = 0, reset = 1, vdin = 0;
  logic [K-1:0] din = '0, dout;
  logic [N-1:0] error = '0;
  logic         vdout, wrong, busy;

  bch_codec dut (.clk(clk), .reset(reset), .din(din), .error(error), .vdin(vdin),
                 .dout(dout), .vdout(vdout), .wrong(wrong), .busy(busy));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TIMEOUT");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic [K-1:0] data, input logic [N-1:0] e, input int nerr, input bit poke);
    int n;
    @(negedge clk); din = data; error = e; vdin = 1;
    @(negedge clk); vdin = 0;
    n = 0;
    while (!vdout) begin
      if (poke && n == 39) begin
        // a second start while busy must be ignored
        din = ~data; error = '1; vdin = 1; ignored_starts++;
        checks++;
        if (!busy) begin failures++; $display("FAIL: busy low during operation"); end
      end else begin
        vdin = 0;
      end
      @(negedge clk); n++;
      if (n > 2 * LAT) break;
    end
    vdin = 0;
    checks++;
    if (n != LAT) begin failures++; $display("FAIL: latency %0d, expected %0d", n, LAT); end
    checks++;
    if (nerr <= T) begin
      if (dout !== data || wrong) begin
        failures++;
        $display("FAIL: %0d errors: din %h dout %h wrong %b", nerr, data, dout, wrong);
      end
      if (nerr > 0) corrected++;
    end else begin
      if (dout === data && !wrong) begin failures++; $display("FAIL: %0d errors unnoticed", nerr); end
      if (wrong) flagged++;
    end
    @(negedge clk);
    checks++;
    if (busy) begin failures++; $display("FAIL: still busy after vdout"); end
  endtask

  initial begin
    logic [127:0] e;
    repeat (3) @(negedge clk);
    reset = 0;
    run(30'h2BCD_EFDD, '0, 0, 0);
    run(30'h2BCD_EFDD, 63'h3 | (63'h3 << 61), 4, 1);      // errors at both ends of the word
    run(30'h2BCD_EFDD, 63'h3F << 20, 6, 0);               // a burst of 6
    run(30'h2BCD_EFDD, 63'h1FF, 9, 0);                    // 9 errors: beyond the code
    for (int i = 0; i < 200; i++) begin
      e = rand_error(N, i % 10);
      run(K'($urandom), e[N-1:0], i % 10, (i % 17) == 0);
    end
    checks++;
    if (corrected == 0 || flagged == 0 || ignored_starts == 0) begin
      failures++;
      $display("FAIL: a mechanism was never exercised");
    end
    $display("corrected=%0d flagged=%0d ignored_starts=%0d", corrected, flagged, ignored_starts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
