// bch_codec: parallel-in, parallel-out BCH encode / channel / decode path.
//
// A K-bit word loaded with a vdin pulse is shifted, most significant bit first,
// into bch_encoder. Each code bit is XORed with one bit of the error pattern
// (an injected channel fault), fed to bch_decoder, and the corrected data bits
// are shifted back into a K-bit register. When the decoder finishes, dout
// holds the corrected word and vdout pulses for one clock together with wrong,
// which is high when the decoder found the word uncorrectable (then dout is
// not trustworthy).
//
// Error pattern: bit i of error flips the code-word coefficient of x^i. The
// code word is sent from x^(N-1) down to x^0, so error[N-1] hits the first
// (most significant data) bit and error[P-1:0] hit the parity bits.
//
// Timing: one code bit per clock. vdout rises exactly 2N + 2T + 3 clocks after
// the clock edge that takes vdin (141 for N = 63, T = 6): N code bits through
// the encoder, 2T + 1 clocks of Berlekamp-Massey, N Chien positions and the
// output registers. busy is high all that time and vdin is ignored while busy.
// The error pattern and the data word are sampled at vdin.
//
// Combining encoder and decoder behind a parallel word and a manual error
// input follows the source description; the bit order, the sampling of the
// inputs at vdin and the one-word-at-a-time operation are this design's.
module bch_codec
  import bch_pkg::*;
#(
  parameter int M = 6,
  parameter int T = 6,
  parameter int K = 30,
  localparam int N = K + bch_gen_deg(M, T)
) (
  input  logic         clk,
  input  logic         reset,
  input  logic [K-1:0] din,
  input  logic [N-1:0] error,
  input  logic         vdin,
  output logic [K-1:0] dout,
  output logic         vdout,
  output logic         wrong,
  output logic         busy
);

  localparam int CW = $clog2(K + 1);

  logic [K-1:0]  shreg_q;     // data still to be sent
  logic [CW-1:0] left_q;      // data bits still to be sent
  logic [N-1:0]  err_q;       // error pattern, shifted in step with the code bits
  logic [K-1:0]  rx_q;        // corrected bits collected from the decoder
  logic          active_q;

  logic enc_dout, enc_vdout, enc_busy;
  logic dec_din, dec_dout, dec_vdout, dec_done, dec_wrong, dec_busy;
  logic send;

  assign send = (left_q != '0);

  bch_encoder #(.M(M), .T(T), .K(K)) u_enc (
    .clk   (clk),
    .reset (reset),
    .din   (shreg_q[K-1]),
    .vdin  (send),
    .dout  (enc_dout),
    .vdout (enc_vdout),
    .busy  (enc_busy)
  );

  // Channel: flip the code bits selected by the error pattern.
  assign dec_din = enc_dout ^ err_q[N-1];

  bch_decoder #(.M(M), .T(T), .K(K)) u_dec (
    .clk   (clk),
    .reset (reset),
    .din   (dec_din),
    .vdin  (enc_vdout),
    .dout  (dec_dout),
    .vdout (dec_vdout),
    .done  (dec_done),
    .wrong (dec_wrong),
    .busy  (dec_busy)
  );

  assign busy = active_q;

  always_ff @(posedge clk) begin
    if (reset) begin
      shreg_q  <= '0;
      left_q   <= '0;
      err_q    <= '0;
      rx_q     <= '0;
      active_q <= 1'b0;
      dout     <= '0;
      vdout    <= 1'b0;
      wrong    <= 1'b0;
    end else begin
      vdout <= 1'b0;
      if (vdin && !active_q) begin
        shreg_q  <= din;
        left_q   <= CW'(K);
        err_q    <= error;
        active_q <= 1'b1;
      end else begin
        if (send) begin
          shreg_q <= shreg_q << 1;
          left_q  <= left_q - 1'b1;
        end
        if (enc_vdout) err_q <= err_q << 1;
        if (dec_vdout) rx_q <= {rx_q[K-2:0], dec_dout};
        if (dec_done) begin
          dout     <= rx_q;
          wrong    <= dec_wrong;
          vdout    <= 1'b1;
          active_q <= 1'b0;
        end
      end
    end
  end

  // The encoder and decoder never overlap two words inside the codec.
  assert property (@(posedge clk) disable iff (reset) enc_vdout |-> !dec_busy);

endmodule
