// ibma: inversionless, simplified Berlekamp-Massey algorithm for binary BCH
// codes. From the syndromes S_1..S_2t it finds the error-locator polynomial
// sigma(x) = 1 + sigma_1 x + ... (up to a nonzero scale factor).
//
// For a binary code every second discrepancy is zero, so only t steps are
// needed (step k uses S_(2k+1)). The division by an earlier discrepancy is
// replaced by cross-multiplication with gamma, the last nonzero discrepancy:
//   d      = sum_(i=0..L) sigma_i * S_(2k+1-i)
//   sigma' = gamma * sigma + d * B
//   if d != 0 and L <= k:  B <- x^2 * sigma,  L <- 2k+1-L,  gamma <- d
//   else:                  B <- x^2 * B
// starting from sigma = 1, B = x, L = 0, gamma = 1. B is kept pre-shifted by
// the x^2 of the skipped odd step. Coefficients above degree t are dropped;
// they cannot affect the lower ones.
//
// Timing: start loads the syndromes; one step per clock, all products in
// parallel (3(t+1) GF multipliers); done pulses T clocks after start, and
// sigma/deg then hold until the next start. The inversionless form follows
// the decoder's choice of an inversion-free BMA; the fully parallel
// one-step-per-clock datapath is this design's choice.
module ibma #(
  parameter int unsigned M    = bch_pkg::BCH_M,
  parameter int unsigned T    = bch_pkg::BCH_T,
  parameter logic [M:0]  POLY = (M+1)'(bch_pkg::BCH_POLY)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  input  logic [2*T-1:0][M-1:0] syn,
  output logic                  done,
  output logic [T:0][M-1:0]     sigma,
  output logic [$clog2(2*T+2)-1:0] deg
);
  import bch_pkg::*;

  localparam int unsigned LW = $clog2(2 * T + 2);
  localparam int unsigned KW = $clog2(T + 1);

  function automatic logic [M-1:0] mul(input logic [M-1:0] a, input logic [M-1:0] b);
    return M'(gf_mul(MMAX'(a), MMAX'(b), M, (MMAX+1)'(POLY)));
  endfunction

  logic [2*T-1:0][M-1:0] s_q;
  logic [T:0][M-1:0]     sig_q, b_q, sig_d, b_d;
  logic [M-1:0]          gamma_q, disc;
  logic [LW-1:0]         l_q;
  logic [KW-1:0]         k_q;
  logic                  busy;

  // Discrepancy of step k: S index 2k+1-i, only terms with index >= 1.
  always_comb begin
    disc = '0;
    for (int i = 0; i <= int'(T); i++)
      if (i <= 2 * int'(k_q))
        disc = disc ^ mul(sig_q[i], s_q[2 * int'(k_q) - i]);
  end

  always_comb begin
    for (int i = 0; i <= int'(T); i++)
      sig_d[i] = mul(gamma_q, sig_q[i]) ^ mul(disc, b_q[i]);
    b_d = '0;
    for (int i = 2; i <= int'(T); i++)
      b_d[i] = (disc != '0 && int'(l_q) <= int'(k_q)) ? sig_q[i-2] : b_q[i-2];
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      busy    <= 1'b0;
      done    <= 1'b0;
      k_q     <= '0;
      l_q     <= '0;
      gamma_q <= '0;
      s_q     <= '0;
      sig_q   <= '0;
      b_q     <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        busy     <= 1'b1;
        k_q      <= '0;
        l_q      <= '0;
        gamma_q  <= M'(1);
        s_q      <= syn;
        sig_q    <= '0;
        sig_q[0] <= M'(1);
        b_q      <= '0;
        b_q[1]   <= M'(1);
      end else if (busy) begin
        sig_q <= sig_d;
        b_q   <= b_d;
        if (disc != '0 && int'(l_q) <= int'(k_q)) begin
          l_q     <= LW'(2 * int'(k_q) + 1 - int'(l_q));
          gamma_q <= disc;
        end
        if (k_q == KW'(T - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end else begin
          k_q <= k_q + 1'b1;
        end
      end
    end

  assign sigma = sig_q;
  assign deg   = l_q;

endmodule
