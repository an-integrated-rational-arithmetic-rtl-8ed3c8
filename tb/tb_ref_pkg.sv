// tb_ref_pkg: reference arithmetic for the rational arithmetic unit
// testbenches, written with wide integers rather than with the unit's
// register structure.
//   bitlen      number of significant bits of a magnitude
//   gcd         greatest common divisor of two magnitudes
//   fs_fits     does u/v fit the packed floating-slash word of field index n
//   fs_decode   value p/q (with sign) of a packed word
//   fs_encode   packed word for p/q known to fit (k = bitlen(q)-1)
//   bne_ref     the seeded binary nonrestoring Euclidian algorithm on whole
//               integers, quotient bits found by scaling with powers of two,
//               with the same stopping rules as the unit (register bound or
//               packed-word bound)
package tb_ref_pkg;

  typedef logic signed [255:0] big_t;

  function automatic big_t babs(big_t x);
    return (x < 0) ? -x : x;
  endfunction

  function automatic int bitlen(big_t x);
    big_t m = babs(x);
    int   b = 0;
    while (m != 0) begin
      m = m >>> 1;
      b++;
    end
    return b;
  endfunction

  function automatic big_t gcd(big_t x, big_t y);
    big_t t;
    x = babs(x); y = babs(y);
    while (y != 0) begin t = x % y; x = y; y = t; end
    return x;
  endfunction

  function automatic bit fs_fits(big_t u, big_t v, int n);
    int bu = bitlen(u);
    int bv = bitlen(v);
    if (bv == 0) return 0;
    if (bu == 0) return 1;
    if (bu + bv <= n + 2) return 1;
    return (bu == 1) && (bv == n + 2);
  endfunction

  // word = {s, k, field}; kw bits of k
  function automatic void fs_decode(logic [63:0] word, int n, int kw,
                                    output big_t p, output big_t q, output bit legal);
    int   k;
    bit   s;
    big_t f;
    s = word[n + 1 + kw];
    k = int'((word >> (n + 1)) & ((64'd1 << kw) - 1));
    f = big_t'(word & ((64'd1 << (n + 1)) - 1));
    legal = (k <= n + 1);
    if (!legal) k = n + 1;
    if (k == n + 1) p = 1;
    else            p = f >>> k;
    q = big_t'(1) <<< k;
    for (int m = 0; m < k; m++)       // position m holds q bit k-1-m
      if (f[m]) q = q + (big_t'(1) <<< (k - 1 - m));
    if (s) p = -p;
  endfunction

  function automatic logic [63:0] fs_encode(big_t u, big_t v, int n, int kw);
    big_t        mu = babs(u);
    big_t        mv = babs(v);
    int          k;
    logic [63:0] w = '0;
    if (mu == 0) return '0;
    k = bitlen(mv) - 1;
    for (int m = 0; m <= n; m++) begin
      if (m < k) w[m] = mv[k - 1 - m];
      else       w[m] = mu[m - k];
    end
    w = w | (64'(k) << (n + 1));
    if ((u < 0) != (v < 0)) w[n + 1 + kw] = 1'b1;
    return w;
  endfunction

  // bound_fs = 0: pairs must fit nbits-bit signed integers
  // bound_fs = 1: pairs must also fit the packed word of field index n
  // every accepted pair of the last bne_ref call, the seed's (b, d) first
  big_t pairs_u [$];
  big_t pairs_v [$];

  function automatic void bne_ref(int nbits, int n, bit bound_fs,
                                  big_t p, big_t q, big_t a, big_t b, big_t c, big_t d,
                                  output big_t u, output big_t v, output bit early);
    big_t hi = big_t'(1) <<< (nbits - 1);
    big_t lo = big_t'(1) <<< (nbits - 2);
    big_t t;
    int   ku;
    bit   done;
    u = b; v = d; early = 0;
    pairs_u = {b};
    pairs_v = {d};
    if (p == 0 && q == 0) begin u = 0; v = 0; return; end
    while (p < lo && p >= -lo && q < lo && q >= -lo) begin
      p = p * 2; q = q * 2;
    end
    ku = 0;
    while (q != 0) begin
      while (q < lo && q >= -lo) begin
        q = q * 2; b = b * 2; d = d * 2; ku++;
      end
      done = 0;
      while (!done) begin
        if (p < lo && p >= -lo) begin
          if (ku == 0) done = 1;
          else begin p = p * 2; b = b / 2; d = d / 2; ku--; end
        end else if ((p < 0) == (q < 0)) begin
          p = p - q; a = a + b; c = c + d;
        end else begin
          p = p + q; a = a - b; c = c - d;
        end
      end
      if (a >= hi || a < -hi || c >= hi || c < -hi ||
          (bound_fs && !fs_fits(a, c, n))) begin
        early = 1;
        return;
      end
      t = p; p = q; q = t;
      t = a; a = b; b = t;
      t = c; c = d; d = t;
      u = b; v = d;
      pairs_u.push_back(u);
      pairs_v.push_back(v);
    end
  endfunction

endpackage
