// bch_decoder: bit-serial, pipelined decoder for the binary BCH code of
// bch_encoder.
//
// Three stages work concurrently, each on its own word of N = K + P bits:
//  A. Syndromes. While a word arrives (highest degree first, one bit per clock
//     with vdin high) each syndrome S_j = r(alpha^j), j = 1..2T, is accumulated
//     by Horner's rule, S_j <= S_j * alpha^j + bit, and the bits are kept in an
//     N-bit shift register. With the last bit, syndromes and word move on to B.
//  B. Berlekamp-Massey. The inversionless Berlekamp-Massey algorithm runs one
//     iteration per clock for 2T clocks and leaves the error-locator polynomial
//     sigma(x) = sigma_0 + sigma_1 x + ... + sigma_T x^T (up to a constant
//     factor) and its length L. B then hands sigma, L and the word to C as soon
//     as C is idle or in its last clock.
//  C. Chien search. One position per clock, from x^(N-1) down to x^0, the
//     registers c_i = sigma_i * alpha^(-i*p) are summed; a zero sum marks an
//     error at position p and the stored bit is inverted as it leaves. The first
//     K positions are the data bits: they appear on dout with vdout high.
//     The remaining P positions are searched only to count roots.
// After the last position, done pulses for one clock and wrong goes high if the
// number of roots found differs from L or L exceeds T (the word had more
// errors than the code can correct); wrong holds until the next done.
//
// Timing: done follows the last input bit of a word by N + 2T + 1 clocks.
// Input is accepted at every clock: words may arrive back to back, one every
// N clocks, and are then decoded at that rate (2T + 1 < N keeps stage B ahead
// of the input). busy is high while stage B or C holds a word.
//
// The serial input and output, decoding the next word while the previous one
// leaves, the syndromes of M bits, the locator of degree T and the
// Berlekamp-Massey algorithm follow the source description; the inversionless
// form, the serial Chien search, the stage hand-over and the rule for wrong
// are this design's.
module bch_decoder
  import bch_pkg::*;
#(
  parameter int M = 6,
  parameter int T = 6,
  parameter int K = 30
) (
  input  logic clk,
  input  logic reset,
  input  logic din,
  input  logic vdin,
  output logic dout,
  output logic vdout,
  output logic done,
  output logic wrong,
  output logic busy
);

  localparam int P  = bch_gen_deg(M, T);
  localparam int N  = K + P;
  localparam int Q  = (1 << M) - 1;
  localparam int CW = $clog2(N + 1);

  typedef logic [M-1:0] elem_t;
  typedef enum logic [1:0] {B_IDLE, B_RUN, B_WAIT} bstate_t;

  function automatic elem_t apow(input int e);
    gf_t v;
    v = gf_alpha_pow(e, M);
    return v[M-1:0];
  endfunction

  typedef logic [2*T:0][M-1:0] cvec_t;

  // Constant tables: POW_C[i] = alpha^i (syndrome and Chien steps),
  // OFFS_C[i] = alpha^(i*(Q-N+1)) (Chien start at position N-1).
  function automatic cvec_t const_table(input int sel);
    cvec_t c;
    c = '0;
    for (int i = 0; i <= 2 * T; i++)
      c[i] = (sel == 2) ? apow((i * (Q - N + 1)) % Q) : apow(i);
    return c;
  endfunction

  localparam cvec_t POW_C  = const_table(0);
  localparam cvec_t OFFS_C = const_table(2);

  function automatic elem_t mul(input elem_t x, input elem_t y);
    gf_t v;
    v = gf_mul(gf_t'(x), gf_t'(y), M);
    return v[M-1:0];
  endfunction

  // ---- stage A: syndromes and received word ----
  logic [CW-1:0]  acnt_q;
  logic [N-2:0]   aword_q;       // all but the last bit of the word
  elem_t          syn_q   [1:2*T];
  elem_t          syn_n   [1:2*T];
  logic           a_last;

  // ---- stage B: Berlekamp-Massey ----
  bstate_t        bstate_q;
  logic [CW-1:0]  bcnt_q;         // iteration r
  logic [N-1:0]   bword_q;
  elem_t          bsyn_q  [1:2*T];
  elem_t          lam_q   [0:T];
  elem_t          bpl_q   [0:T];
  elem_t          gam_q;
  logic [5:0]     len_q;          // LFSR length L

  // ---- stage C: Chien search ----
  logic           cact_q;
  logic [CW-1:0]  ccnt_q;
  logic [N-1:0]   cword_q;
  logic [5:0]     clen_q;
  logic [5:0]     roots_q;
  elem_t          chien_q [0:T];
  logic           c_last, b_hand;

  always_comb begin
    for (int j = 1; j <= 2 * T; j++) syn_n[j] = mul(syn_q[j], POW_C[j]) ^ elem_t'(din);
  end
  assign a_last = vdin && (acnt_q == CW'(N - 1));
  assign c_last = cact_q && (ccnt_q == CW'(N - 1));
  assign b_hand = (bstate_q == B_WAIT) && (!cact_q || c_last);

  // Berlekamp-Massey iteration (combinational part)
  elem_t delta;
  elem_t lam_n [0:T];
  logic  bm_swap;
  always_comb begin
    delta = '0;
    for (int i = 0; i <= T; i++) begin
      if (int'(bcnt_q) + 1 - i >= 1 && int'(bcnt_q) + 1 - i <= 2 * T)
        delta = delta ^ mul(lam_q[i], bsyn_q[int'(bcnt_q) + 1 - i]);
    end
    lam_n[0] = mul(gam_q, lam_q[0]);
    for (int i = 1; i <= T; i++) lam_n[i] = mul(gam_q, lam_q[i]) ^ mul(delta, bpl_q[i-1]);
    bm_swap = (delta != '0) && (2 * int'(len_q) <= int'(bcnt_q));
  end

  // Chien evaluation
  elem_t chien_sum;
  logic  is_root;
  always_comb begin
    chien_sum = '0;
    for (int i = 0; i <= T; i++) chien_sum = chien_sum ^ chien_q[i];
    is_root = (chien_sum == '0);
  end

  assign busy = (bstate_q != B_IDLE) || cact_q;

  // Stage A
  always_ff @(posedge clk) begin
    if (reset) begin
      acnt_q  <= '0;
      aword_q <= '0;
      for (int j = 1; j <= 2 * T; j++) syn_q[j] <= '0;
    end else if (vdin) begin
      aword_q <= {aword_q[N-3:0], din};
      if (a_last) begin
        acnt_q <= '0;
        for (int j = 1; j <= 2 * T; j++) syn_q[j] <= '0;
      end else begin
        acnt_q <= acnt_q + 1'b1;
        for (int j = 1; j <= 2 * T; j++) syn_q[j] <= syn_n[j];
      end
    end
  end

  // Stage B
  always_ff @(posedge clk) begin
    if (reset) begin
      bstate_q <= B_IDLE;
      bcnt_q   <= '0;
      bword_q  <= '0;
      gam_q    <= '0;
      len_q    <= '0;
      for (int j = 1; j <= 2 * T; j++) bsyn_q[j] <= '0;
      for (int i = 0; i <= T; i++) begin
        lam_q[i] <= '0;
        bpl_q[i] <= '0;
      end
    end else begin
      unique case (bstate_q)
        B_RUN: begin
          for (int i = 0; i <= T; i++) lam_q[i] <= lam_n[i];
          if (bm_swap) begin
            for (int i = 0; i <= T; i++) bpl_q[i] <= lam_q[i];
            len_q <= 6'(int'(bcnt_q) + 1 - int'(len_q));
            gam_q <= delta;
          end else begin
            bpl_q[0] <= '0;
            for (int i = 1; i <= T; i++) bpl_q[i] <= bpl_q[i-1];
          end
          if (bcnt_q == CW'(2 * T - 1)) bstate_q <= B_WAIT;
          bcnt_q <= bcnt_q + 1'b1;
        end
        B_WAIT:  if (b_hand) bstate_q <= B_IDLE;
        default: ;
      endcase
      // A new word from stage A (stage B is always free by then, see assertion).
      if (a_last) begin
        bstate_q <= B_RUN;
        bcnt_q   <= '0;
        bword_q  <= {aword_q[N-2:0], din};
        for (int j = 1; j <= 2 * T; j++) bsyn_q[j] <= syn_n[j];
        for (int i = 0; i <= T; i++) begin
          lam_q[i] <= (i == 0) ? elem_t'(1) : '0;
          bpl_q[i] <= (i == 0) ? elem_t'(1) : '0;
        end
        gam_q <= elem_t'(1);
        len_q <= '0;
      end
    end
  end

  // Stage C
  always_ff @(posedge clk) begin
    if (reset) begin
      cact_q  <= 1'b0;
      ccnt_q  <= '0;
      cword_q <= '0;
      clen_q  <= '0;
      roots_q <= '0;
      dout    <= 1'b0;
      vdout   <= 1'b0;
      done    <= 1'b0;
      wrong   <= 1'b0;
      for (int i = 0; i <= T; i++) chien_q[i] <= '0;
    end else begin
      vdout <= 1'b0;
      done  <= 1'b0;
      if (cact_q) begin
        for (int i = 0; i <= T; i++) chien_q[i] <= mul(chien_q[i], POW_C[i]);
        cword_q <= cword_q << 1;
        if (is_root) roots_q <= roots_q + 1'b1;
        if (ccnt_q < CW'(K)) begin
          dout  <= cword_q[N-1] ^ is_root;
          vdout <= 1'b1;
        end
        ccnt_q <= ccnt_q + 1'b1;
        if (c_last) begin
          cact_q <= 1'b0;
          done   <= 1'b1;
          wrong  <= ((roots_q + 6'(is_root)) != clen_q) || (int'(clen_q) > T);
        end
      end
      // Hand-over from stage B (may coincide with the last Chien clock).
      if (b_hand) begin
        cact_q  <= 1'b1;
        ccnt_q  <= '0;
        roots_q <= '0;
        cword_q <= bword_q;
        clen_q  <= len_q;
        for (int i = 0; i <= T; i++) chien_q[i] <= mul(lam_q[i], OFFS_C[i]);
      end
    end
  end

  // Words arrive at least N clocks apart and B needs 2T + 1 of them.
  assert property (@(posedge clk) disable iff (reset) a_last |-> (bstate_q == B_IDLE));

endmodule
