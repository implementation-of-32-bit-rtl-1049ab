// booth_radix4_pp: radix-4 Booth recoder and partial-product generator for a
// W x W two's-complement multiplication (W even).
//
// The multiplier y is scanned in overlapping triplets {y[2i+1], y[2i], y[2i-1]}
// (y[-1] = 0), each recoded to a digit d_i in {-2, -1, 0, +1, +2}, so the
// product is sum_i d_i * x * 4^i with only W/2 partial products instead of W.
// Row i (i = 0 .. W/2-1) holds d_i * x sign-extended to 2W bits and shifted
// left by 2i. A negative digit is produced as the one's complement of |d_i|*x;
// the missing +1 of each negation is placed at bit 2i of the extra row W/2.
// The sum of all W/2+1 rows, modulo 2^(2W), is the signed product x*y.
//
// Purely combinational. Radix-4 Booth recoding follows the source description;
// full sign extension and the separate row of negation bits are this design's
// choices.
module booth_radix4_pp #(
  parameter int W = 32
) (
  input  logic [W-1:0]              x,
  input  logic [W-1:0]              y,
  output logic [W/2:0][2*W-1:0]     pp
);

  localparam int D = W / 2;   // Booth digits

  initial assert (W % 2 == 0) else $error("booth_radix4_pp: W must be even");

  logic [2*W-1:0] x1, x2;
  assign x1 = {{W{x[W-1]}}, x};
  assign x2 = x1 << 1;

  logic [W:0] yext;           // y with the implicit y[-1] = 0 at index 0
  assign yext = {y, 1'b0};

  logic [D-1:0] neg;

  for (genvar i = 0; i < D; i++) begin : g_digit
    logic [2:0]     trip;
    logic           one, two;
    logic [2*W-1:0] mag;
    assign trip   = yext[2*i +: 3];
    assign one    = trip[1] ^ trip[0];
    assign two    = (trip == 3'b100) || (trip == 3'b011);
    assign neg[i] = trip[2] & ~(trip[1] & trip[0]);
    assign mag    = one ? x1 : (two ? x2 : '0);
    assign pp[i]  = (neg[i] ? ~mag : mag) << (2 * i);
  end

  always_comb begin
    pp[D] = '0;
    for (int i = 0; i < D; i++) pp[D][2*i] = neg[i];
  end

endmodule
