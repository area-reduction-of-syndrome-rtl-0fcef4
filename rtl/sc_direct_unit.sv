// sc_direct_unit: direct computation of one syndrome S_I = r(alpha^I),
// P received bits per clock.
//
// The codeword arrives highest degree first, P bits per word, din[b] being
// the coefficient of degree (word base + b). Horner's rule over words gives
//   acc <- acc * alpha^(I*P) + sum_b din[b] * alpha^(I*b)
// so after the last word acc = sum_pos r_pos * alpha^(I*pos). Both terms are
// multiplications by constants and therefore XOR networks, built at
// elaboration. With first = 1 the old accumulator is dropped, which starts a
// new codeword without a separate clear cycle.
//
// Timing: one word per clock when en = 1; syn is the registered accumulator
// and holds its value while en = 0. The P-parallel Horner form follows the
// parallel syndrome unit the design is built on; the word order and the
// 'first' flag are this design's choices.
module sc_direct_unit #(
  parameter int unsigned M    = bch_pkg::BCH_M,
  parameter int unsigned N    = bch_pkg::BCH_N,
  parameter int unsigned P    = bch_pkg::BCH_P,
  parameter int unsigned I    = 1,
  parameter logic [M:0]  POLY = (M+1)'(bch_pkg::BCH_POLY)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic         first,
  input  logic [P-1:0] din,
  output logic [M-1:0] syn
);
  import bch_pkg::*;

  // Matrix of multiplication by the constant alpha^e: column c = alpha^(c+e).
  function automatic logic [M-1:0][M-1:0] mul_cols(input longint unsigned e);
    logic [M-1:0][M-1:0] c;
    for (int unsigned b = 0; b < M; b++)
      c[b] = M'(gf_alpha_pow((e + longint'(b)) % longint'(N), M, (MMAX+1)'(POLY)));
    return c;
  endfunction

  // DIN_COL[b] = alpha^(I*b): weight of input bit b within its word.
  function automatic logic [P-1:0][M-1:0] din_cols();
    logic [P-1:0][M-1:0] c;
    for (int unsigned b = 0; b < P; b++)
      c[b] = M'(gf_alpha_pow((longint'(I) * b) % longint'(N), M, (MMAX+1)'(POLY)));
    return c;
  endfunction

  localparam logic [M-1:0][M-1:0] STEP_COL = mul_cols((longint'(I) * P) % longint'(N));
  localparam logic [P-1:0][M-1:0] DIN_COL  = din_cols();

  logic [M-1:0] acc, acc_shift, word_val;

  always_comb begin
    acc_shift = '0;
    if (!first)
      for (int unsigned b = 0; b < M; b++)
        if (acc[b]) acc_shift = acc_shift ^ STEP_COL[b];
    word_val = '0;
    for (int unsigned b = 0; b < P; b++)
      if (din[b]) word_val = word_val ^ DIN_COL[b];
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)  acc <= '0;
    else if (en) acc <= acc_shift ^ word_val;

  assign syn = acc;

endmodule
