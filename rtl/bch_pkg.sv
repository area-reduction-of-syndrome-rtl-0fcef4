// bch_pkg: code parameters and GF(2^m) helper functions shared by the BCH
// decoder modules.
//
// The code is the binary BCH(n = 255, k = 111, t = 18) code over GF(2^8).
// Field elements are M-bit vectors in polynomial basis (bit b is the
// coefficient of alpha^b). The primitive polynomial x^8+x^4+x^3+x^2+1 is this
// design's choice; any primitive polynomial of degree M works, passed in as
// POLY (bit M set).
//
// All functions are constant functions. Where a module feeds them its
// parameters they fold to fixed XOR networks at elaboration: a constant
// multiplier by alpha^e and the power map x -> x^(2^k) are both linear over
// GF(2), so each output bit is the XOR of a fixed subset of input bits.
package bch_pkg;

  localparam int unsigned BCH_M    = 8;
  localparam int unsigned BCH_N    = 255;      // 2^m - 1
  localparam int unsigned BCH_K    = 111;
  localparam int unsigned BCH_T    = 18;
  localparam int unsigned BCH_P    = 8;        // syndrome bits per clock
  localparam logic [8:0]  BCH_POLY = 9'h11D;   // x^8+x^4+x^3+x^2+1

  localparam int unsigned MMAX = 16;           // widest field these helpers handle

  // Multiply a by alpha once: shift left and reduce by the primitive polynomial.
  function automatic logic [MMAX-1:0] gf_xtime(input logic [MMAX-1:0] a,
                                               input int unsigned m,
                                               input logic [MMAX:0] poly);
    logic [MMAX:0] s;
    s = {a, 1'b0};
    if (s[m]) s = s ^ poly;
    return s[MMAX-1:0] & ((MMAX'(1) << m) - 1);
  endfunction

  // alpha^e (e taken modulo 2^m - 1).
  function automatic logic [MMAX-1:0] gf_alpha_pow(input longint unsigned e,
                                                   input int unsigned m,
                                                   input logic [MMAX:0] poly);
    logic [MMAX-1:0] r;
    longint unsigned n;
    n = (64'd1 << m) - 1;
    r = 1;
    for (longint unsigned i = 0; i < e % n; i++) r = gf_xtime(r, m, poly);
    return r;
  endfunction

  // General product a*b, shift-and-add.
  function automatic logic [MMAX-1:0] gf_mul(input logic [MMAX-1:0] a,
                                             input logic [MMAX-1:0] b,
                                             input int unsigned m,
                                             input logic [MMAX:0] poly);
    logic [MMAX-1:0] acc, sh;
    acc = '0;
    sh  = a;
    for (int unsigned i = 0; i < m; i++) begin
      if (b[i]) acc = acc ^ sh;
      sh = gf_xtime(sh, m, poly);
    end
    return acc;
  endfunction

  // Odd index o <= omax whose cyclotomic coset (mod n) holds j, smallest such o,
  // packed as {o, k} with j = o * 2^k mod n; 0 if none.
  function automatic int unsigned coset_src(input int unsigned j,
                                            input int unsigned omax,
                                            input int unsigned m);
    int unsigned n;
    n = (1 << m) - 1;
    for (int unsigned o = 1; o <= omax; o += 2)
      for (int unsigned k = 0; k < m; k++)
        if (((o << k) % n) == (j % n)) return (o << 8) | k;
    return 0;
  endfunction

  function automatic int unsigned coset_o(input int unsigned j, input int unsigned omax,
                                          input int unsigned m);
    return coset_src(j, omax, m) >> 8;
  endfunction

  function automatic int unsigned coset_k(input int unsigned j, input int unsigned omax,
                                          input int unsigned m);
    return coset_src(j, omax, m) & 32'hFF;
  endfunction

  // Number of odd indices in 1..2t that need a direct syndrome unit
  // (those that are not conjugates of a smaller odd index).
  function automatic int unsigned n_direct(input int unsigned t, input int unsigned m);
    int unsigned c;
    c = 0;
    for (int unsigned j = 1; j <= 2 * t; j += 2)
      if (coset_o(j, 2 * t, m) == j) c++;
    return c;
  endfunction

  // Syndrome index of the d-th direct unit (d = 0, 1, ...).
  function automatic int unsigned direct_index(input int unsigned d, input int unsigned t,
                                               input int unsigned m);
    int unsigned c;
    c = 0;
    for (int unsigned j = 1; j <= 2 * t; j += 2)
      if (coset_o(j, 2 * t, m) == j) begin
        if (c == d) return j;
        c++;
      end
    return 0;
  endfunction

  // Position among the direct units of direct syndrome index o.
  function automatic int unsigned direct_pos(input int unsigned o, input int unsigned t,
                                             input int unsigned m);
    int unsigned c;
    c = 0;
    for (int unsigned j = 1; j < o; j += 2)
      if (coset_o(j, 2 * t, m) == j) c++;
    return c;
  endfunction

endpackage
