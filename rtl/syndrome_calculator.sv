// syndrome_calculator: the area-reduced syndrome calculator (SC) of the
// BCH decoder. It computes S_1 .. S_2t of a received word r(x).
//
// Idea: S_(j*2^k) = (S_j)^(2^k) for a binary code, because squaring commutes
// with evaluating a polynomial with 0/1 coefficients. Every index j in 1..2t
// therefore belongs to the cyclotomic coset {o, 2o, 4o, ...} (mod n) of some
// odd index o. Only an odd index that is the smallest member of its coset
// within 1..2t gets a P-parallel direct unit (sc_direct_unit); every other
// syndrome is taken from its coset leader through a power operation unit
// (gf_power, an XOR network). This covers all even syndromes and, beyond
// that, odd syndromes that are conjugates of a smaller odd one. For
// n = 255, t = 18 these are S_33 = S_9^32 and S_35 = S_25^32, so 16 direct
// units serve all 36 syndromes instead of 18. The coset assignment is worked
// out at elaboration from M and T.
//
// Interface and timing: a codeword is ceil(N/P) words on in_data, highest
// degree first (see sc_direct_unit), one word per clock while in_valid = 1;
// gaps are allowed. The cycle after the last word, done pulses for one clock
// and syn holds S_1..S_2t (syn[i-1] = S_i) until the next codeword's first
// word is accepted. The next word after the last one starts a new codeword.
module syndrome_calculator #(
  parameter int unsigned M    = bch_pkg::BCH_M,
  parameter int unsigned N    = bch_pkg::BCH_N,
  parameter int unsigned T    = bch_pkg::BCH_T,
  parameter int unsigned P    = bch_pkg::BCH_P,
  parameter logic [M:0]  POLY = (M+1)'(bch_pkg::BCH_POLY)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic [P-1:0]         in_data,
  output logic                 done,
  output logic [2*T-1:0][M-1:0] syn
);
  import bch_pkg::*;

  localparam int unsigned NW  = (N + P - 1) / P;      // words per codeword
  localparam int unsigned WW  = $clog2(NW + 1);
  localparam int unsigned ND  = n_direct(T, M);       // direct units

  logic [WW-1:0] wcnt;
  logic          first, last;

  assign first = (wcnt == '0);
  assign last  = (wcnt == WW'(NW - 1));

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      wcnt <= '0;
      done <= 1'b0;
    end else begin
      done <= in_valid && last;
      if (in_valid) wcnt <= last ? '0 : wcnt + 1'b1;
    end

  // Direct computation, one unit per coset leader.
  logic [ND-1:0][M-1:0] dsyn;

  for (genvar d = 0; d < ND; d++) begin : g_direct
    sc_direct_unit #(.M(M), .N(N), .P(P), .I(direct_index(d, T, M)), .POLY(POLY)) u_dir (
      .clk   (clk),
      .rst_n (rst_n),
      .en    (in_valid),
      .first (first),
      .din   (in_data),
      .syn   (dsyn[d])
    );
  end

  // Every syndrome: either a direct result or a power of its coset leader.
  for (genvar j = 1; j <= 2 * T; j++) begin : g_syn
    localparam int unsigned O = coset_o(j, 2 * T, M);
    localparam int unsigned K = coset_k(j, 2 * T, M);
    if (K == 0) begin : g_dir
      assign syn[j-1] = dsyn[direct_pos(O, T, M)];
    end else begin : g_pow
      gf_power #(.M(M), .POLY(POLY), .K(K)) u_pow (
        .x (dsyn[direct_pos(O, T, M)]),
        .y (syn[j-1])
      );
    end
  end

endmodule
