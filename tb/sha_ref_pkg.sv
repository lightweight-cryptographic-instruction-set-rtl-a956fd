// sha_ref_pkg: SHA-256 reference used by the testbenches.
// The constants are computed, not tabulated: K_t is the first 32 fraction
// bits of the cube root of the t-th prime (t = 0..63) and H0_i those of the
// square root of the i-th prime (i = 0..7), found exactly with integer
// binary search on floor(root(p * 2^96)) and floor(sqrt(p * 2^64)).
// Also a plain reference round, schedule word and message padding.
package sha_ref_pkg;

  function automatic bit is_prime(int n);
    if (n < 2) return 0;
    for (int d = 2; d * d <= n; d++) if (n % d == 0) return 0;
    return 1;
  endfunction

  function automatic int nth_prime(int idx);
    int n, c;
    n = 1; c = -1;
    while (c < idx) begin
      n++;
      if (is_prime(n)) c++;
    end
    return n;
  endfunction

  function automatic logic [31:0] frac_root(int p, int root);
    logic [127:0] target, lo, hi, mid, pw;
    target = 128'(p) << (root == 3 ? 96 : 64);
    lo = 0; hi = 128'h1 << 40;
    while (hi - lo > 1) begin
      mid = (lo + hi) >> 1;
      pw = (root == 3) ? mid * mid * mid : mid * mid;
      if (pw <= target) lo = mid; else hi = mid;
    end
    return lo[31:0];
  endfunction

  function automatic logic [31:0] k_const(int t);
    return frac_root(nth_prime(t), 3);
  endfunction

  function automatic logic [31:0] h_init(int i);
    return frac_root(nth_prime(i), 2);
  endfunction

  function automatic logic [31:0] ror(logic [31:0] x, int n);
    logic [63:0] d;
    d = {x, x} >> n;
    return d[31:0];
  endfunction

  // st[0] = a .. st[7] = h
  typedef logic [31:0] words8_t [8];

  function automatic words8_t ref_round(words8_t s, logic [31:0] k, logic [31:0] w);
    logic [31:0] t1, t2;
    words8_t o;
    t1 = s[7] + (ror(s[4], 6) ^ ror(s[4], 11) ^ ror(s[4], 25))
       + ((s[4] & s[5]) | (~s[4] & s[6])) + k + w;
    t2 = (ror(s[0], 2) ^ ror(s[0], 13) ^ ror(s[0], 22))
       + ((s[0] & s[1]) | (s[0] & s[2]) | (s[1] & s[2]));
    o[0] = t1 + t2; o[1] = s[0]; o[2] = s[1]; o[3] = s[2];
    o[4] = s[3] + t1; o[5] = s[4]; o[6] = s[5]; o[7] = s[6];
    return o;
  endfunction

  function automatic logic [31:0] ref_sched(logic [31:0] w2, logic [31:0] w7,
                                            logic [31:0] w15, logic [31:0] w16);
    return (ror(w2, 17) ^ ror(w2, 19) ^ (w2 >> 10)) + w7
         + (ror(w15, 7) ^ ror(w15, 18) ^ (w15 >> 3)) + w16;
  endfunction

  // Pad a message of n bytes (n <= 119) into 32 words (up to two blocks);
  // returns the number of blocks.
  function automatic int pad(byte unsigned msg [], output logic [31:0] w [32]);
    byte unsigned b [128];
    int n, nb;
    n = msg.size();
    nb = (n + 9 + 63) / 64;
    for (int i = 0; i < 128; i++) b[i] = 0;
    for (int i = 0; i < n; i++) b[i] = msg[i];
    b[n] = 8'h80;
    for (int i = 0; i < 8; i++) b[nb*64 - 1 - i] = 8'((64'(n) * 8) >> (8*i));
    for (int i = 0; i < 32; i++) w[i] = {b[4*i], b[4*i+1], b[4*i+2], b[4*i+3]};
    return nb;
  endfunction

endpackage
