// sa_ref_pkg: reference model for the testbenches, written independently of
// the RTL.
//
// Field arithmetic is done the long way: a carry-less product of two
// polynomials followed by reduction modulo the full field polynomial
// P(x) = x^m + poly, by long division from the top degree down. Symbols are
// up to 32 bits wide; m and poly are passed in so the same model serves
// every field size. The chip responses of the board under test are a fixed
// pseudo-random function of chip number, pattern number and a seed, and an
// injected error is XORed onto one chip's response.
package sa_ref_pkg;

  typedef logic [31:0] sym_t;

  // Carry-less product a*b reduced modulo x^m + poly.
  function automatic sym_t gf_mul(sym_t a, sym_t b, int m, sym_t poly);
    logic [63:0] prod;
    logic [63:0] full;
    prod = '0;
    for (int i = 0; i < m; i++)
      if (b[i]) prod ^= (64'(a) << i);
    full = (64'(1) << m) | 64'(poly);
    for (int d = 2 * m - 2; d >= m; d--)
      if (prod[d]) prod ^= full << (d - m);
    return sym_t'(prod) & ((sym_t'(1) << m) - 1);
  endfunction

  // alpha^k with alpha = x, by square-and-multiply.
  function automatic sym_t gf_alpha_pow(longint unsigned k, int m, sym_t poly);
    sym_t r, base;
    r = 1;
    base = 2;
    while (k != 0) begin
      if (k[0]) r = gf_mul(r, base, m, poly);
      base = gf_mul(base, base, m, poly);
      k >>= 1;
    end
    return r;
  endfunction

  // Fault-free response of chip i (1-based) to pattern t.
  function automatic sym_t chip_resp(int i, int t, int seed, int m);
    logic [63:0] h;
    h = 64'h9E3779B97F4A7C15 ^ (64'(i) << 40) ^ (64'(t) << 8) ^ 64'(seed);
    for (int r = 0; r < 3; r++) begin
      h ^= h >> 29;
      h *= 64'hBF58476D1CE4E5B9;
      h ^= h >> 32;
    end
    return sym_t'(h) & ((sym_t'(1) << m) - 1);
  endfunction

endpackage
