// ia_ref_pkg: reference arithmetic for the interval multiplier testbenches.
//
// Works on the simulator's own double precision reals, independently of the
// RTL. Directed roundings of a product are derived from the round-to-nearest
// product and its exact error, which Dekker's error-free product gives
// (split each operand into 26-bit halves; valid while no partial product
// overflows or underflows, so the random operands stay in a moderate
// exponent range). If the error is negative the nearest product is above
// the exact one, and the round-down value is the next double below it;
// symmetrically for round-up.
package ia_ref_pkg;

  typedef logic [63:0] bits_t;

  function automatic logic is_nan(bits_t x);
    return x[62:52] == '1 && x[51:0] != '0;
  endfunction

  function automatic bits_t next_up(bits_t x);
    if (x[62:0] == '0) return 64'h1;
    if (!x[63])        return x + 1;
    return x - 1;
  endfunction

  function automatic bits_t next_down(bits_t x);
    if (x[62:0] == '0) return 64'h8000_0000_0000_0001;
    if (x[63])         return x + 1;
    return x - 1;
  endfunction

  // exact a*b - fl(a*b)
  function automatic real two_prod_err(real a, real b, real p);
    real c, ah, al, bh, bl;
    c  = 134217729.0 * a;
    ah = c - (c - a);
    al = a - ah;
    c  = 134217729.0 * b;
    bh = c - (c - b);
    bl = b - bh;
    return ((ah * bh - p) + ah * bl + al * bh) + al * bl;
  endfunction

  function automatic bits_t mul_rn(bits_t a, bits_t b);
    return $realtobits($bitstoreal(a) * $bitstoreal(b));
  endfunction

  function automatic bits_t mul_dn(bits_t a, bits_t b);
    real ra, rb, p;
    ra = $bitstoreal(a); rb = $bitstoreal(b); p = ra * rb;
    if (two_prod_err(ra, rb, p) < 0.0) return next_down($realtobits(p));
    return $realtobits(p);
  endfunction

  function automatic bits_t mul_up(bits_t a, bits_t b);
    real ra, rb, p;
    ra = $bitstoreal(a); rb = $bitstoreal(b); p = ra * rb;
    if (two_prod_err(ra, rb, p) > 0.0) return next_up($realtobits(p));
    return $realtobits(p);
  endfunction

  // random double with exponent field in [emin, emax] and random sign
  function automatic bits_t rnd_fp(int emin, int emax);
    bits_t r;
    r[63]    = 1'($urandom);
    r[62:52] = 11'(emin + int'($urandom_range(emax - emin)));
    r[51:0]  = {$urandom, $urandom};
    return r;
  endfunction

  // random value with a chosen sign, moderate exponent
  function automatic bits_t rnd_signed(logic neg);
    bits_t r;
    r = rnd_fp(1000, 1046);
    r[63] = neg;
    return r;
  endfunction

endpackage
