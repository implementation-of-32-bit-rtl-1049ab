// sklansky_adder: W-bit parallel-prefix adder with Sklansky (divide-and-conquer)
// carry tree.
//
// Bit i first forms generate g = a&b and propagate p = a^b. In level l of the
// tree (l = 0 .. log2(W)-1) every bit whose index has bit l set merges its
// group (G,P) with the group ending at the last bit of the lower half-block,
// index ((i >> l) << l) - 1: G = G_i | P_i & G_j, P = P_i & P_j. After log2(W)
// levels bit i holds the group signals of bits i..0, so the carry into bit
// i+1 is G | P & cin and sum = p ^ carry. The tree has the minimum depth,
// log2(W) prefix levels, and its fan-out doubles at each level.
//
// Purely combinational. The same module, at 2W bits, serves as the final
// carry-propagate adder of the multiplier.
//
// The choice of a Sklansky tree follows the source description; the
// generate/propagate formulation and the carry-in handling are standard.
module sklansky_adder #(
  parameter int W = 32
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);

  localparam int L = (W > 1) ? $clog2(W) : 1;

  logic [W-1:0] gl [0:L];
  logic [W-1:0] pl [0:L];

  assign gl[0] = a & b;
  assign pl[0] = a ^ b;

  for (genvar l = 0; l < L; l++) begin : g_level
    for (genvar i = 0; i < W; i++) begin : g_bit
      if (((i >> l) & 1) == 1) begin : g_merge
        localparam int J = ((i >> l) << l) - 1;
        assign gl[l+1][i] = gl[l][i] | (pl[l][i] & gl[l][J]);
        assign pl[l+1][i] = pl[l][i] & pl[l][J];
      end else begin : g_pass
        assign gl[l+1][i] = gl[l][i];
        assign pl[l+1][i] = pl[l][i];
      end
    end
  end

  logic [W:0] carry;
  assign carry[0]   = cin;
  assign carry[W:1] = gl[L] | (pl[L] & {W{cin}});
  assign sum        = pl[0] ^ carry[W-1:0];
  assign cout       = carry[W];

endmodule
