// gf_power: power operation y = x^(2^K) in GF(2^M).
//
// Squaring is linear over GF(2) in a binary extension field, so raising to any
// power of two is a fixed matrix: output = XOR of the columns (alpha^b)^(2^K)
// selected by the set bits x[b]. The unit is pure combinational XOR logic and
// has no clock. The syndrome calculator uses it to obtain a syndrome S_j from
// a conjugate syndrome S_o, j = o * 2^K mod (2^M - 1), without a direct
// syndrome unit. The matrix is built at elaboration from the primitive
// polynomial POLY. Deriving syndromes through such XOR-only power units is
// the area-saving idea of the syndrome calculator; using one matrix per
// exponent, rather than a chain of squarers, is this design's choice.
module gf_power #(
  parameter int unsigned M    = bch_pkg::BCH_M,
  parameter logic [M:0]  POLY = (M+1)'(bch_pkg::BCH_POLY),
  parameter int unsigned K    = 1
) (
  input  logic [M-1:0] x,
  output logic [M-1:0] y
);
  import bch_pkg::*;

  localparam int unsigned N = (1 << M) - 1;

  // COLS[b] = (alpha^b)^(2^K) = alpha^(b * 2^K mod N)
  function automatic logic [M-1:0][M-1:0] build_cols();
    logic [M-1:0][M-1:0] c;
    for (int unsigned b = 0; b < M; b++)
      c[b] = M'(gf_alpha_pow((longint'(b) << K) % longint'(N), M, (MMAX+1)'(POLY)));
    return c;
  endfunction

  localparam logic [M-1:0][M-1:0] COLS = build_cols();

  always_comb begin
    y = '0;
    for (int unsigned b = 0; b < M; b++)
      if (x[b]) y = y ^ COLS[b];
  end

endmodule
