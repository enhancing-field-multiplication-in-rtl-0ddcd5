// mm_ref_pkg: word-level reference arithmetic in GF(2^k), k <= 255, for the
// testbenches of the systolic Montgomery multiplier. Polynomials are bit
// vectors, bit i holding the coefficient of x^i. fk is the full field
// polynomial including its x^k term. These routines work on whole words
// and share no structure with the bit-serial hardware.
package mm_ref_pkg;

  typedef logic [255:0] poly_t;

  // a * b mod F by schoolbook multiply then long division.
  function automatic poly_t mulmod(poly_t a, poly_t b, poly_t fk, int k);
    logic [511:0] prod;
    prod = '0;
    for (int i = 0; i < k; i++)
      if (b[i]) prod ^= (512'(a) << i);
    for (int i = 2 * k - 2; i >= k; i--)
      if (prod[i]) prod ^= (512'(fk) << (i - k));
    return poly_t'(prod);
  endfunction

  // a * x^-n mod F (F has f_0 = 1, so x is invertible).
  function automatic poly_t divx(poly_t a, poly_t fk, int n);
    poly_t r = a;
    for (int i = 0; i < n; i++) begin
      if (r[0]) r ^= fk;
      r = r >> 1;
    end
    return r;
  endfunction

  // a * x^n mod F.
  function automatic poly_t mulx(poly_t a, poly_t fk, int k, int n);
    poly_t r = a;
    for (int i = 0; i < n; i++) begin
      r = r << 1;
      if (r[k]) r ^= fk;
    end
    return r;
  endfunction

  // Montgomery product C * D * x^-(k-1)/2 mod F.
  function automatic poly_t mont(poly_t c, poly_t d, poly_t fk, int k);
    return divx(mulmod(c, d, fk, k), fk, (k - 1) / 2);
  endfunction

  // Uniform random element of GF(2^k).
  function automatic poly_t rand_elem(int k);
    poly_t r;
    for (int i = 0; i < 8; i++) r[32*i +: 32] = $urandom;
    return r & ((poly_t'(1) << k) - 1);
  endfunction

endpackage
