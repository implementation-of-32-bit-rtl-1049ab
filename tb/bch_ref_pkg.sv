// bch_ref_pkg: reference model used by the BCH testbenches.
//
// Generator polynomials are given as constants from the standard tables of
// binary BCH codes (bit i = coefficient of x^i), independently of the
// elaboration-time computation in the design:
//   length 63,  t = 6: octal 157464165547          (degree 33, k = 30)
//   length 127, t = 6: octal 130704476322273       (degree 42, k = 85)
// ref_encode() forms the systematic code word d(x) x^P + (d(x) x^P mod g(x))
// by long division over GF(2).
package bch_ref_pkg;

  localparam logic [127:0] G63_T6  = 128'o157464165547;
  localparam int           P63_T6  = 33;
  localparam logic [127:0] G127_T6 = 128'o130704476322273;
  localparam int           P127_T6 = 42;

  function automatic logic [127:0] ref_encode(input logic [127:0] data, input int k,
                                              input int p, input logic [127:0] g);
    logic [127:0] r;
    r = data << p;
    for (int i = k + p - 1; i >= p; i--)
      if (r[i]) r = r ^ (g << (i - p));
    return (data << p) | r;
  endfunction

  // Random error pattern of exactly w ones within the low n bits.
  function automatic logic [127:0] rand_error(input int n, input int w);
    logic [127:0] e;
    int           pos;
    e = '0;
    for (int i = 0; i < w; i++) begin
      do pos = int'($urandom_range(n - 1, 0)); while (e[pos]);
      e[pos] = 1'b1;
    end
    return e;
  endfunction

endpackage
