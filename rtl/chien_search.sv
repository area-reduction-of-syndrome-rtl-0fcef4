// chien_search: serial Chien search. It tests every nonzero field element
// as a root of sigma(x) and reports, for each codeword position, whether that
// bit is in error.
//
// With lambda_j = sigma_j * (alpha^i)^j, sigma(alpha^i) = sum_j lambda_j, and
// stepping from alpha^i to alpha^(i+1) only multiplies each lambda_j by the
// constant alpha^j (a fixed XOR network per term). The roots of sigma are the
// inverses of the error locators, so a root alpha^i marks position n - i. The
// search starts at alpha^1 (start loads lambda_j = sigma_j * alpha^j), which
// makes the positions come out as n-1, n-2, ..., 0: the order in which the
// codeword was received.
//
// Timing: after start, err_valid is high for N consecutive clocks, one
// position per clock, beginning the clock after start; err_last marks
// position 0. The serial evaluation and the lambda recursion are the
// conventional method; the search order is this design's choice.
module chien_search #(
  parameter int unsigned M    = bch_pkg::BCH_M,
  parameter int unsigned N    = bch_pkg::BCH_N,
  parameter int unsigned T    = bch_pkg::BCH_T,
  parameter logic [M:0]  POLY = (M+1)'(bch_pkg::BCH_POLY)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [T:0][M-1:0] sigma,
  output logic              err_valid,
  output logic              err_bit,
  output logic              err_last
);
  import bch_pkg::*;

  localparam int unsigned CW = $clog2(N + 1);

  // Multiplication by alpha^j as a matrix: column b = alpha^(b+j).
  function automatic logic [T:0][M-1:0][M-1:0] build_cols();
    logic [T:0][M-1:0][M-1:0] c;
    for (int unsigned j = 0; j <= T; j++)
      for (int unsigned b = 0; b < M; b++)
        c[j][b] = M'(gf_alpha_pow((longint'(b) + longint'(j)) % longint'(N), M, (MMAX+1)'(POLY)));
    return c;
  endfunction

  localparam logic [T:0][M-1:0][M-1:0] COLS = build_cols();

  function automatic logic [M-1:0] mul_alpha_j(input logic [M-1:0] a, input int unsigned j);
    logic [M-1:0] r;
    r = '0;
    for (int unsigned b = 0; b < M; b++)
      if (a[b]) r = r ^ COLS[j][b];
    return r;
  endfunction

  logic [T:0][M-1:0] lam_q, lam_d;
  logic [M-1:0]      sum;
  logic [CW-1:0]     cnt;

  always_comb begin
    sum = '0;
    for (int unsigned j = 0; j <= T; j++) begin
      sum      = sum ^ lam_q[j];
      lam_d[j] = mul_alpha_j(start ? sigma[j] : lam_q[j], j);
    end
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      lam_q     <= '0;
      cnt       <= '0;
      err_valid <= 1'b0;
    end else begin
      if (start) begin
        lam_q     <= lam_d;
        cnt       <= CW'(N - 1);
        err_valid <= 1'b1;
      end else if (err_valid) begin
        lam_q <= lam_d;
        if (cnt == '0) err_valid <= 1'b0;
        else           cnt <= cnt - 1'b1;
      end
    end

  assign err_bit  = err_valid && (sum == '0);
  assign err_last = err_valid && (cnt == '0);

endmodule
