// tb_rns_pkg: arithmetic shared by the converter testbenches.
//
// All reference values are computed in 320-bit unsigned integers with the
// modulus width n passed at run time, so one routine serves every size of
// the converter (n up to 100). Nothing here uses the converter's own
// shortcuts (rotations, one's complement): references come from plain
// multiplication, division and remainder.
package tb_rns_pkg;

  typedef logic [319:0] wide_t;

  function automatic wide_t pow2(int n);
    wide_t one = 320'd1;
    return one << n;
  endfunction

  // Uniform-ish random value in [0, bound), bound > 0.
  function automatic wide_t rand_below(wide_t bound);
    wide_t r;
    for (int i = 0; i < 10; i++) r[i*32 +: 32] = $urandom;
    return r % bound;
  endfunction

  // Two-part RNS forward conversion of X (3n bits): x1, x2 are residues of
  // the upper 2n bits, x3 is the lower n bits.
  function automatic void forward(input int n, input wide_t x,
                                  output wide_t x1, output wide_t x2,
                                  output wide_t x3);
    wide_t xh = x >> n;
    x1 = xh % (pow2(n) + 1);
    x2 = xh % (pow2(n) - 1);
    x3 = x % pow2(n);
  endfunction

  // Output of the converter exactly as published (no zero correction) for
  // canonical residues: correct except where S' = 2^n - 1, i.e. x1 = x2
  // (x1 <= 2^n - 2) or x1 = 2^n with x2 = 1, where X(a) wraps to
  // x1 + 2^2n - 1 mod 2^2n.
  function automatic bit published_flaw(input int n, input wide_t x1,
                                        input wide_t x2);
    return (x1 == x2 && x1 <= pow2(n) - 2) || (x1 == pow2(n) && x2 == 1);
  endfunction

endpackage
