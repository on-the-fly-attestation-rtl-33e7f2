// sha256_ref_pkg: reference model of the SHA-256 compression function for
// the testbenches. Written as the textbook algorithm (whole 64-word message
// schedule first, then 64 rounds), independent of the round-per-cycle
// hardware. The round constants are generated here from their definition
// (first 32 bits of the fractional parts of the cube roots of the first 64
// primes) with a 64-bit integer cube root, so they do not share a table with
// the design.
package sha256_ref_pkg;

  typedef logic [31:0] word_t;

  function automatic word_t ror(word_t x, int n);
    return (x >> n) | (x << (32 - n));
  endfunction

  function automatic bit is_prime(int n);
    for (int d = 2; d * d <= n; d++)
      if (n % d == 0) return 1'b0;
    return 1'b1;
  endfunction

  // floor(cbrt(p) * 2^32) mod 2^32 = floor(cbrt(p * 2^96)) mod 2^32
  function automatic word_t frac_cbrt(int p);
    logic [127:0] n, lo, hi, mid;
    n  = 128'(p) << 96;
    lo = 0;
    hi = 128'h1 << 36;
    while (hi - lo > 1) begin
      mid = (lo + hi) >> 1;
      if (mid * mid * mid <= n) lo = mid;
      else                      hi = mid;
    end
    return lo[31:0];
  endfunction

  word_t k_table [64];
  bit    k_ready = 1'b0;

  // round constant t; the table is filled on first use
  function automatic word_t k(int t);
    if (!k_ready) begin
      int p = 1;
      for (int i = 0; i < 64; i++) begin
        do p++; while (!is_prime(p));
        k_table[i] = frac_cbrt(p);
      end
      k_ready = 1'b1;
    end
    return k_table[t];
  endfunction

  function automatic logic [255:0] h0();
    return {32'h6a09e667, 32'hbb67ae85, 32'h3c6ef372, 32'ha54ff53a,
            32'h510e527f, 32'h9b05688c, 32'h1f83d9ab, 32'h5be0cd19};
  endfunction

  // one compression: h is H0..H7 (H0 in the top bits), m is the block
  // with word 0 in the top bits
  function automatic logic [255:0] compress(logic [255:0] h, logic [511:0] m);
    word_t w [64];
    word_t v [8];
    word_t hv [8];
    word_t t1, t2, s0, s1;
    for (int i = 0; i < 8; i++) begin
      hv[i] = h[32*(7-i) +: 32];
      v[i]  = hv[i];
    end
    for (int t = 0; t < 64; t++) begin
      if (t < 16) w[t] = m[32*(15-t) +: 32];
      else begin
        s0 = ror(w[t-15], 7) ^ ror(w[t-15], 18) ^ (w[t-15] >> 3);
        s1 = ror(w[t-2], 17) ^ ror(w[t-2], 19) ^ (w[t-2] >> 10);
        w[t] = w[t-16] + s0 + w[t-7] + s1;
      end
    end
    for (int t = 0; t < 64; t++) begin
      t1 = v[7] + (ror(v[4], 6) ^ ror(v[4], 11) ^ ror(v[4], 25)) +
           ((v[4] & v[5]) ^ (~v[4] & v[6])) + k(t) + w[t];
      t2 = (ror(v[0], 2) ^ ror(v[0], 13) ^ ror(v[0], 22)) +
           ((v[0] & v[1]) ^ (v[0] & v[2]) ^ (v[1] & v[2]));
      for (int i = 7; i > 0; i--) v[i] = v[i-1];
      v[4] = v[4] + t1;   // v[4] now holds old d
      v[0] = t1 + t2;
    end
    for (int i = 0; i < 8; i++)
      compress[32*(7-i) +: 32] = hv[i] + v[i];
  endfunction

endpackage
