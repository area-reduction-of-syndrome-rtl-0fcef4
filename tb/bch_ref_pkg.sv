// bch_ref_pkg: reference model for the BCH decoder testbenches.
//
// GF(2^8) arithmetic through exponent/logarithm tables built by stepping an
// LFSR over the primitive polynomial x^8+x^4+x^3+x^2+1 (independent of the
// shift-and-add arithmetic in the RTL), syndrome evaluation straight from
// the definition S_i = r(alpha^i), a non-systematic encoder v(x) = m(x)g(x)
// with g(x) the product of (x - alpha^e) over all conjugates of
// alpha^1..alpha^2t, and helpers to build error patterns.
//
// For n = 255, t = 18 that product has degree 124, not m*t = 144: alpha^17
// has only four conjugates, and alpha^33, alpha^35 are conjugates of alpha^9,
// alpha^25. Messages are still k = 111 bits, so every word produced is a
// codeword of the t = 18 code (with its top 20 message bits zero). The
// decoder itself does not depend on k.
// Call ref_init() once before use.
package bch_ref_pkg;

  localparam int RM = 8;
  localparam int RN = 255;
  localparam int RT = 18;
  localparam int RK = 111;
  localparam int RPOLY = 'h11D;

  typedef logic [255:0] word_t;     // bit d = coefficient of x^d

  int exp_t [0:509];
  int log_t [0:255];
  logic [RN-RK:0] gpoly;            // generator polynomial (degree gdeg <= n-k)
  int gdeg;

  function automatic int rmul(input int a, input int b);
    if (a == 0 || b == 0) return 0;
    return exp_t[log_t[a] + log_t[b]];
  endfunction

  function automatic int rpow_alpha(input int e);
    return exp_t[((e % RN) + RN) % RN];
  endfunction

  function automatic int rinv(input int a);
    return exp_t[(RN - log_t[a]) % RN];
  endfunction

  function automatic void ref_init();
    int x;
    int g [0:RN];
    bit in_set [0:RN-1];
    int deg;
    x = 1;
    for (int i = 0; i < RN; i++) begin
      exp_t[i] = x;
      exp_t[i + RN] = x;
      log_t[x] = i;
      x = x << 1;
      if ((x & 'h100) != 0) x = x ^ RPOLY;
    end
    log_t[0] = 0;
    // roots: alpha^(j*2^k) for j = 1..2t
    for (int i = 0; i < RN; i++) in_set[i] = 0;
    for (int j = 1; j <= 2 * RT; j++)
      for (int k = 0; k < RM; k++) in_set[(j << k) % RN] = 1;
    for (int i = 0; i <= RN; i++) g[i] = 0;
    g[0] = 1;
    deg = 0;
    for (int e = 0; e < RN; e++)
      if (in_set[e]) begin
        // g(x) <- g(x) * (x + alpha^e)
        for (int i = deg + 1; i >= 1; i--) g[i] = g[i-1] ^ rmul(g[i], exp_t[e]);
        g[0] = rmul(g[0], exp_t[e]);
        deg++;
      end
    gdeg = deg;
    for (int i = 0; i <= RN - RK; i++) begin
      if (g[i] > 1) $display("ref: generator coefficient not binary");
      gpoly[i] = g[i][0];
    end
  endfunction

  // S_i = sum over set bits d of alpha^(i*d)
  function automatic int ref_syndrome(input word_t r, input int i);
    int s;
    s = 0;
    for (int d = 0; d < RN; d++) if (r[d]) s = s ^ rpow_alpha(i * d);
    return s;
  endfunction

  function automatic word_t ref_encode(input logic [RK-1:0] msg);
    word_t v;
    v = '0;
    for (int i = 0; i < RK; i++)
      if (msg[i]) v = v ^ (word_t'(gpoly) << i);
    return v;
  endfunction

  function automatic word_t random_msg_codeword();
    logic [RK-1:0] m;
    for (int i = 0; i < RK; i++) m[i] = 1'($urandom);
    return ref_encode(m);
  endfunction

  // Random error pattern of exactly w distinct positions in 0..n-1.
  function automatic word_t random_errors(input int w);
    word_t e;
    int p;
    e = '0;
    for (int c = 0; c < w; ) begin
      p = int'($urandom % RN);
      if (!e[p]) begin
        e[p] = 1'b1;
        c++;
      end
    end
    return e;
  endfunction

  function automatic word_t random_word();
    word_t r;
    for (int d = 0; d < RN; d++) r[d] = 1'($urandom);
    r[255] = 1'b0;
    return r;
  endfunction

endpackage
