// ft_alu: fault-tolerant W-bit ALU whose two operands are protected by BCH
// codes that correct up to T = 6 bit errors each.
//
// Each operand goes through its own bch_codec: it is BCH-encoded, an injected
// error pattern (errora / errorb, one bit per code bit) is XORed onto the code
// word, and the decoder removes up to T errors. The corrected operands douta
// and doutb feed alu32, which applies the opcode captured at vdin. The result
// is registered into dout with a one-clock vdout pulse. wronga / wrongb are
// the decoders' uncorrectable-word flags and wrong is their OR; when wrong is
// high the result must be discarded.
//
// Code: 32 data bits and 6 correctable errors need more than a 63-bit word
// (length 63 with T = 6 leaves only 30 data bits), so the default here is the
// BCH code over GF(2^7) with T = 6 (42 parity bits) shortened to W = 32 data
// bits: N = 74-bit code words and 74-bit error inputs.
//
// Timing: start with a one-clock vdin while busy is low; a, b, opcode, errora
// and errorb are sampled then. Both codecs run in lock step, one code bit per
// clock, and vdout rises 2N + 2T + 4 clocks after the edge that takes vdin
// (164 clocks for N = 74, T = 6).
//
// The structure (two codecs in front of the ALU, per-operand error inputs,
// the wrong flags, a 3-bit opcode with 000 = ADD) follows the source
// description; the 74-bit code word and the handshake are this design's.
module ft_alu
  import bch_pkg::*;
  import alu_pkg::*;
#(
  parameter int  W = 32,
  parameter int  M = 7,
  parameter int  T = 6,
  localparam int N = W + bch_gen_deg(M, T)
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [2:0]   opcode,
  input  logic [N-1:0] errora,
  input  logic [N-1:0] errorb,
  input  logic         vdin,
  output logic [W-1:0] dout,
  output logic         vdout,
  output logic         wrong,
  output logic [W-1:0] douta,
  output logic [W-1:0] doutb,
  output logic         wronga,
  output logic         wrongb,
  output logic         busy
);

  logic    start;
  logic    busy_q, da_q, db_q;
  alu_op_e op_q;
  logic    vdouta, vdoutb, busya, busyb;
  logic [W-1:0] alu_y;
  logic    alu_cout;

  assign start = vdin && !busy_q;
  assign busy  = busy_q;

  bch_codec #(.M(M), .T(T), .K(W)) u_codec_a (
    .clk   (clk),
    .reset (rst),
    .din   (a),
    .error (errora),
    .vdin  (start),
    .dout  (douta),
    .vdout (vdouta),
    .wrong (wronga),
    .busy  (busya)
  );

  bch_codec #(.M(M), .T(T), .K(W)) u_codec_b (
    .clk   (clk),
    .reset (rst),
    .din   (b),
    .error (errorb),
    .vdin  (start),
    .dout  (doutb),
    .vdout (vdoutb),
    .wrong (wrongb),
    .busy  (busyb)
  );

  alu32 #(.W(W)) u_alu (
    .a      (douta),
    .b      (doutb),
    .opcode (op_q),
    .y      (alu_y),
    .cout   (alu_cout)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      busy_q <= 1'b0;
      da_q   <= 1'b0;
      db_q   <= 1'b0;
      op_q   <= OP_ADD;
      dout   <= '0;
      vdout  <= 1'b0;
      wrong  <= 1'b0;
    end else begin
      vdout <= 1'b0;
      if (start) begin
        busy_q <= 1'b1;
        da_q   <= 1'b0;
        db_q   <= 1'b0;
        op_q   <= alu_op_e'(opcode);
      end else if (busy_q) begin
        if (vdouta) da_q <= 1'b1;
        if (vdoutb) db_q <= 1'b1;
        // A codec's dout is valid from its vdout pulse on.
        if ((da_q || vdouta) && (db_q || vdoutb)) begin
          dout   <= alu_y;
          wrong  <= wronga | wrongb;
          vdout  <= 1'b1;
          busy_q <= 1'b0;
        end
      end
    end
  end

  // A codec never reports a word the top did not start.
  assert property (@(posedge clk) disable iff (rst) (vdouta || vdoutb) |-> busy_q);
  // Both codecs are idle whenever the top is.
  assert property (@(posedge clk) disable iff (rst) !busy_q |-> !(busya || busyb));

endmodule
