// bch_encoder: bit-serial systematic encoder for a binary BCH code.
//
// The code corrects T errors in words of N = K + P bits, where P is the degree
// of the generator polynomial g(x) of the BCH code over GF(2^M) (computed in
// bch_pkg). Data is systematic: the K data bits leave first, unchanged, highest
// polynomial degree first, and the P parity bits (the remainder of
// x^P * d(x) / g(x)) follow. The remainder is built by a P-bit LFSR that divides
// by g(x) while the data bits pass through.
//
// Interface and timing: present one data bit per clock on din with vdin high
// (gaps with vdin low are allowed). Each code bit appears on dout with vdout
// high one clock after its data bit. After the K-th data bit the encoder is
// busy for P clocks, shifting out the parity bits, and ignores din; it is then
// ready for the next word. A word therefore takes N clocks at full rate
// (63 for the default BCH(63,30) code with M=6, T=6).
//
// The serial, one-bit-per-clock encoder and the code (length 63, six
// correctable errors) follow the source description; the systematic bit order,
// the output register and the synchronous reset are choices of this design.
module bch_encoder
  import bch_pkg::*;
#(
  parameter int M = 6,   // field GF(2^M), full code length 2^M-1
  parameter int T = 6,   // correctable errors
  parameter int K = 30   // data bits per word (at most 2^M-1-P)
) (
  input  logic clk,
  input  logic reset,
  input  logic din,
  input  logic vdin,
  output logic dout,
  output logic vdout,
  output logic busy
);

  localparam int     P   = bch_gen_deg(M, T);
  localparam gpoly_t GEN = bch_gen_poly(M, T);
  localparam int     N   = K + P;
  localparam logic [P-1:0] GTAPS = GEN[P-1:0];

  initial assert (N <= (1 << M) - 1) else $error("bch_encoder: K too large for GF(2^%0d), T=%0d", M, T);

  logic [P-1:0]            rem_q;
  logic [$clog2(N+1)-1:0]  cnt_q;   // bits of the current word sent so far
  logic                    par_phase;

  assign par_phase = (cnt_q >= K[$clog2(N+1)-1:0]);
  assign busy      = par_phase;

  always_ff @(posedge clk) begin
    if (reset) begin
      rem_q <= '0;
      cnt_q <= '0;
      dout  <= 1'b0;
      vdout <= 1'b0;
    end else if (par_phase) begin
      dout  <= rem_q[P-1];
      vdout <= 1'b1;
      rem_q <= rem_q << 1;
      if (cnt_q == N[$clog2(N+1)-1:0] - 1'b1) cnt_q <= '0;
      else                                   cnt_q <= cnt_q + 1'b1;
    end else if (vdin) begin
      dout  <= din;
      vdout <= 1'b1;
      rem_q <= (rem_q << 1) ^ ((din ^ rem_q[P-1]) ? GTAPS : '0);
      cnt_q <= cnt_q + 1'b1;
    end else begin
      vdout <= 1'b0;
    end
  end

endmodule
