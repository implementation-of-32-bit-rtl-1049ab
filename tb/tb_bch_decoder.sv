// tb_bch_decoder: sends reference BCH(63,30) code words with random error
// patterns through bch_decoder. With up to 6 errors the 30 data bits must come
// out exact and wrong must stay low; with 7 to 12 errors the decoder must not
// return the original data with wrong low (it either flags the word or lands
// on a different code word). Checks the timing: done follows the last input
// bit after N + 2T + 1 = 76 clocks, and 30 data bits are output per word.
// Finally words are streamed back to back with no gap: every word must still
// be decoded correctly, one done every N = 63 clocks.
module tb_bch_decoder;
  timeunit 1ns; timeprecision 1ps;
  import bch_ref_pkg::*;

  localparam int K = 30, P = P63_T6, N = K + P, T = 6;

  int checks = 0, failures = 0;
  int corrected_words = 0, flagged_words = 0, miscorrected_words = 0;

  logic clk = 0, reset = 1, din = 0, vdin = 0;
  logic dout, vdout, done, wrong, busy;

  bch_decoder dut (.clk(clk), .reset(reset), .din(din), .vdin(vdin), .dout(dout), .vdout(vdout),
                   .done(done), .wrong(wrong), .busy(busy));

  always #5 clk = ~clk;

  int cyc = 0;
  always @(posedge clk) cyc++;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TIMEOUT");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [K-1:0] got;
  int           nout = 0;
  always @(posedge clk) if (vdout) begin got = {got[K-2:0], dout}; nout++; end

  // Results of every done, for the streaming test.
  logic [K-1:0] res_data [$];
  logic         res_wrong [$];
  int           done_cyc [$];
  always @(posedge clk) if (done) begin
    res_data.push_back(got); res_wrong.push_back(wrong); done_cyc.push_back(cyc);
  end

  task automatic stream_words(input int nwords);
    logic [K-1:0]  data [$];
    int            nerr [$];
    logic [127:0]  code;
    res_data.delete(); res_wrong.delete(); done_cyc.delete();
    for (int w = 0; w < nwords; w++) begin
      data.push_back(K'($urandom));
      nerr.push_back(w % 10);
      code = ref_encode(128'(data[w]), K, P, G63_T6) ^ rand_error(N, nerr[w]);
      for (int i = N - 1; i >= 0; i--) begin
        @(negedge clk); din = code[i]; vdin = 1;
      end
    end
    @(negedge clk); vdin = 0; din = 0;
    repeat (2 * N + 2 * T + 4) @(negedge clk);
    checks++;
    if (res_data.size() != nwords) begin
      failures++;
      $display("FAIL: stream of %0d words gave %0d results", nwords, res_data.size());
    end else begin
      for (int w = 0; w < nwords; w++) begin
        checks++;
        if (nerr[w] <= T) begin
          if (res_data[w] !== data[w] || res_wrong[w]) begin
            failures++;
            $display("FAIL: stream word %0d (%0d errors) got %h expected %h", w, nerr[w], res_data[w], data[w]);
          end else if (nerr[w] > 0) corrected_words++;
        end else begin
          if (res_data[w] === data[w] && !res_wrong[w]) begin failures++; $display("FAIL: stream word %0d unnoticed", w); end
          if (res_wrong[w]) flagged_words++;
        end
        if (w > 0) begin
          checks++;
          if (done_cyc[w] - done_cyc[w-1] != N) begin
            failures++;
            $display("FAIL: stream words %0d clocks apart, expected %0d", done_cyc[w] - done_cyc[w-1], N);
          end
        end
      end
    end
  endtask

  task automatic run_word(input logic [K-1:0] data, input int nerr);
    logic [127:0] code, err;
    int           last_cyc;
    code = ref_encode(128'(data), K, P, G63_T6);
    err  = rand_error(N, nerr);
    code = code ^ err;
    nout = 0;
    for (int i = N - 1; i >= 0; i--) begin
      @(negedge clk); din = code[i]; vdin = 1;
    end
    last_cyc = cyc + 1;           // the next posedge takes the last bit
    @(negedge clk); vdin = 0; din = 0;
    while (!done) @(negedge clk);
    checks++;
    if (cyc - last_cyc != N + 2 * T + 1) begin
      failures++;
      $display("FAIL: done %0d clocks after last bit, expected %0d", cyc - last_cyc, N + 2 * T + 1);
    end
    checks++;
    if (nout != K) begin failures++; $display("FAIL: %0d data bits out", nout); end
    checks++;
    if (nerr <= T) begin
      if (got !== data || wrong) begin
        failures++;
        $display("FAIL: %0d errors, data %h got %h wrong=%b", nerr, data, got, wrong);
      end
      if (nerr > 0) corrected_words++;
    end else begin
      if (got === data && !wrong) begin
        failures++;
        $display("FAIL: %0d errors reported as clean", nerr);
      end
      if (wrong) flagged_words++; else miscorrected_words++;
    end
    @(negedge clk);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    reset = 0;
    for (int w = 0; w <= T; w++) run_word(K'($urandom), w);
    for (int i = 0; i < 300; i++) run_word(K'($urandom), i % (T + 1));
    for (int i = 0; i < 60; i++) run_word(K'($urandom), T + 1 + (i % 6));
    stream_words(40);
    checks++;
    if (corrected_words == 0 || flagged_words == 0) begin
      failures++;
      $display("FAIL: correction or detection never exercised");
    end
    $display("corrected=%0d flagged=%0d miscorrected=%0d", corrected_words, flagged_words, miscorrected_words);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
