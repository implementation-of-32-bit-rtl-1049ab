// bch_pkg: Galois-field GF(2^m) arithmetic and BCH code construction shared by
// the encoder, the decoder and the codec.
//
// Field elements are held in polynomial basis in the low m bits of a gf_t
// (bit i is the coefficient of alpha^i). Multiplication is the bit-serial
// shift-and-reduce polynomial-basis product; in hardware it unrolls into an
// AND/XOR array. The field is built from a fixed primitive polynomial per m
// (x^6+x+1 for m=6, x^7+x^3+1 for m=7, ...), a choice of this design.
//
// bch_gen_poly() computes, at elaboration time, the generator polynomial of the
// narrow-sense binary BCH code of length 2^m-1 correcting t errors: the product
// of the distinct minimal polynomials of alpha^1, alpha^3, ..., alpha^(2t-1).
// bch_gen_deg() returns its degree, i.e. the number of parity bits.
package bch_pkg;

  localparam int MAX_M   = 10;
  localparam int MAX_DEG = 128;

  typedef logic [MAX_M-1:0]   gf_t;
  typedef logic [MAX_DEG:0]   gpoly_t;

  // Primitive polynomial for GF(2^m), bit m set, as an integer mask.
  function automatic int unsigned prim_poly(input int m);
    case (m)
      3:       return 'h00B;  // x^3+x+1
      4:       return 'h013;  // x^4+x+1
      5:       return 'h025;  // x^5+x^2+1
      6:       return 'h043;  // x^6+x+1
      7:       return 'h089;  // x^7+x^3+1
      8:       return 'h11D;  // x^8+x^4+x^3+x^2+1
      9:       return 'h211;  // x^9+x^4+1
      default: return 'h409;  // x^10+x^3+1
    endcase
  endfunction

  // Polynomial-basis product of two elements of GF(2^m).
  function automatic gf_t gf_mul(input gf_t a, input gf_t b, input int m);
    gf_t acc;
    gf_t sh;
    gf_t pp;
    pp  = gf_t'(prim_poly(m));
    acc = '0;
    sh  = a;
    for (int i = 0; i < MAX_M; i++) begin
      if (i < m) begin
        if (b[i]) acc = acc ^ sh;
        // sh = sh * alpha mod p(x)
        if (sh[m-1]) sh = ((sh << 1) ^ pp) & gf_t'((1 << m) - 1);
        else         sh = (sh << 1) & gf_t'((1 << m) - 1);
      end
    end
    return acc;
  endfunction

  // alpha^e for any non-negative exponent e (square and multiply).
  function automatic gf_t gf_alpha_pow(input int e, input int m);
    gf_t r;
    gf_t base;
    int  ee;
    ee   = e % ((1 << m) - 1);
    r    = gf_t'(1);
    base = gf_t'(2);
    for (int i = 0; i < 16; i++) begin
      if (((ee >> i) & 1) != 0) r = gf_mul(r, base, m);
      base = gf_mul(base, base, m);
    end
    return r;
  endfunction

  // Generator polynomial of the t-error-correcting binary BCH code over GF(2^m).
  // Bit i of the result is the coefficient of x^i.
  function automatic gpoly_t bch_gen_poly(input int m, input int t);
    gpoly_t      g;
    gpoly_t      gnext;
    gf_t         mp [MAX_DEG+1];   // minimal polynomial with GF coefficients
    bit          used [1<<MAX_M];
    int          q;
    int          e;
    int          deg;
    gf_t         root;
    q = (1 << m) - 1;
    for (int i = 0; i < (1 << MAX_M); i++) used[i] = 1'b0;
    g    = '0;
    g[0] = 1'b1;
    for (int i = 1; i < 2 * t; i += 2) begin
      if (!used[i % q]) begin
        // Minimal polynomial: product of (x + alpha^e) over the cyclotomic coset of i.
        for (int k = 0; k <= MAX_DEG; k++) mp[k] = '0;
        mp[0] = gf_t'(1);
        deg   = 0;
        e     = i % q;
        while (!used[e]) begin
          used[e] = 1'b1;
          root    = gf_alpha_pow(e, m);
          // mp(x) = mp(x) * (x + root)
          for (int k = MAX_DEG; k >= 1; k--) mp[k] = mp[k-1] ^ gf_mul(mp[k], root, m);
          mp[0] = gf_mul(mp[0], root, m);
          deg++;
          e = (2 * e) % q;
        end
        // Coefficients are now 0 or 1: multiply into g over GF(2).
        gnext = '0;
        for (int k = 0; k <= deg; k++)
          if (mp[k][0]) gnext = gnext ^ (g << k);
        g = gnext;
      end
    end
    return g;
  endfunction

  function automatic int bch_gen_deg(input int m, input int t);
    gpoly_t g;
    int     d;
    g = bch_gen_poly(m, t);
    d = 0;
    for (int k = 0; k <= MAX_DEG; k++) if (g[k]) d = k;
    return d;
  endfunction

endpackage
