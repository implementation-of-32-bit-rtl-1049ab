// booth_wallace_mul: W x W two's-complement multiplier, 2W-bit product.
//
// Three stages, all combinational: booth_radix4_pp recodes the multiplier into
// W/2 radix-4 Booth digits and forms W/2+1 partial-product rows; wallace_tree
// compresses them with rows of full adders to a carry-save pair; a 2W-bit
// sklansky_adder (the same adder design the ALU uses for ADD and SUB) adds the
// pair to the final product.
//
// The structure (radix-4 Booth, Wallace tree, Sklansky adder reused as the
// carry-propagate adder) follows the source description.
module booth_wallace_mul #(
  parameter int W = 32
) (
  input  logic [W-1:0]   x,
  input  logic [W-1:0]   y,
  output logic [2*W-1:0] p
);

  localparam int ROWS = W / 2 + 1;

  logic [ROWS-1:0][2*W-1:0] pp;
  logic [2*W-1:0]           s_row, c_row;
  logic                     unused_cout;

  booth_radix4_pp #(.W(W)) u_pp (
    .x  (x),
    .y  (y),
    .pp (pp)
  );

  wallace_tree #(.ROWS(ROWS), .W(2 * W)) u_tree (
    .rows      (pp),
    .sum_row   (s_row),
    .carry_row (c_row)
  );

  sklansky_adder #(.W(2 * W)) u_cpa (
    .a    (s_row),
    .b    (c_row),
    .cin  (1'b0),
    .sum  (p),
    .cout (unused_cout)
  );

endmodule
