// bch_decoder: decoder for the binary BCH(n = 255, k = 111, t = 18) code,
// correcting up to t random bit errors per codeword.
//
// Datapath, in the order a codeword passes through it:
//   syndrome_calculator  S_1..S_2t, P bits per clock, area-reduced (direct
//                        units only for coset leaders, the rest by power
//                        operation)
//   ibma                 error-locator polynomial sigma(x), t clocks
//   chien_search         one codeword position per clock, n clocks
//   codeword_buffer      the received bits, read back in step with the
//                        Chien search; out_bit = r_pos XOR e_pos
// A small FSM sequences them: RECV (in_ready = 1, words go to the syndrome
// calculator and the buffer) -> BMA -> CHIEN -> RECV. One codeword is in the
// decoder at a time.
//
// Interface: in_data carries P received bits per word, highest degree first
// (word 0, bit P-1 is degree ceil(n/P)*P-1; bits above degree n-1 must be 0).
// A word is taken on a clock where in_valid && in_ready. The corrected
// codeword leaves one bit per clock on out_bit with out_valid, degree n-1
// first; out_last marks degree 0. The output has no backpressure.
//
// Latency of one codeword: ceil(n/P) accepted words, +1 clock for the last
// syndrome update, t BMA clocks, +1 clock to load the Chien search, then n
// output clocks. The module chain and the XOR correction follow the usual
// syndrome / BMA / Chien decoder; the handshake and the FSM are this design's
// choices.
module bch_decoder #(
  parameter int unsigned M    = bch_pkg::BCH_M,
  parameter int unsigned N    = bch_pkg::BCH_N,
  parameter int unsigned T    = bch_pkg::BCH_T,
  parameter int unsigned P    = bch_pkg::BCH_P,
  parameter logic [M:0]  POLY = (M+1)'(bch_pkg::BCH_POLY)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  output logic         in_ready,
  input  logic [P-1:0] in_data,
  output logic         out_valid,
  output logic         out_bit,
  output logic         out_last
);
  localparam int unsigned NW = (N + P - 1) / P;
  localparam int unsigned WW = $clog2(NW + 1);

  typedef enum logic [1:0] {RECV, BMA, CHIEN} state_t;

  state_t state;
  logic   word_acc, first_word;
  logic [WW-1:0] wcnt;

  logic                   sc_done, bma_done;
  logic [2*T-1:0][M-1:0]  syn;
  logic [T:0][M-1:0]      sigma;
  logic                   err_valid, err_bit, err_last, buf_bit;

  assign in_ready   = (state == RECV);
  assign word_acc   = in_valid && in_ready;
  assign first_word = (wcnt == '0);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      state <= RECV;
      wcnt  <= '0;
    end else begin
      if (word_acc) wcnt <= (wcnt == WW'(NW - 1)) ? '0 : wcnt + 1'b1;
      unique case (state)
        RECV:    if (word_acc && wcnt == WW'(NW - 1)) state <= BMA;
        BMA:     if (bma_done) state <= CHIEN;
        CHIEN:   if (err_last) state <= RECV;
        default: state <= RECV;
      endcase
    end

  syndrome_calculator #(.M(M), .N(N), .T(T), .P(P), .POLY(POLY)) u_sc (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (word_acc),
    .in_data  (in_data),
    .done     (sc_done),
    .syn      (syn)
  );

  ibma #(.M(M), .T(T), .POLY(POLY)) u_bma (
    .clk   (clk),
    .rst_n (rst_n),
    .start (sc_done),
    .syn   (syn),
    .done  (bma_done),
    .sigma (sigma),
    .deg   ()
  );

  chien_search #(.M(M), .N(N), .T(T), .POLY(POLY)) u_cs (
    .clk       (clk),
    .rst_n     (rst_n),
    .start     (bma_done),
    .sigma     (sigma),
    .err_valid (err_valid),
    .err_bit   (err_bit),
    .err_last  (err_last)
  );

  codeword_buffer #(.N(N), .P(P)) u_buf (
    .clk      (clk),
    .rst_n    (rst_n),
    .wr_en    (word_acc),
    .wr_first (first_word),
    .wr_data  (in_data),
    .rd_start (bma_done),
    .rd_en    (err_valid),
    .rd_bit   (buf_bit)
  );

  assign out_valid = err_valid;
  assign out_bit   = err_valid && (buf_bit ^ err_bit);
  assign out_last  = err_last;

  // The Chien search must only run after the syndromes are complete and
  // the input must be closed while it runs.
  a_no_input_while_busy: assert property (@(posedge clk) disable iff (!rst_n)
    err_valid |-> !in_ready);
  a_bma_after_sc: assert property (@(posedge clk) disable iff (!rst_n)
    sc_done |-> state == BMA);

endmodule
