// codeword_buffer: holds one received codeword while the decoder computes
// the error pattern, so that the errors can be XORed out of it afterwards.
//
// The storage is an array of ceil(N/P) words of P bits, written in arrival
// order (word 0 holds the highest degrees, as in the syndrome calculator;
// wr_data[b] of word w has degree (NW-1-w)*P + b). Reading is one bit per
// clock from degree N-1 down to 0, matching the order of the Chien search.
//
// Timing: a write happens on the clock edge where wr_en = 1; wr_first resets
// the write pointer to word 0 for that write. rd_start sets the read pointer
// to degree N-1; each rd_en moves it down by one. rd_bit is a combinational
// read of the bit at the read pointer. Depth (one codeword) and organisation
// are this design's choices.
module codeword_buffer #(
  parameter int unsigned N = bch_pkg::BCH_N,
  parameter int unsigned P = bch_pkg::BCH_P
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         wr_en,
  input  logic         wr_first,
  input  logic [P-1:0] wr_data,
  input  logic         rd_start,
  input  logic         rd_en,
  output logic         rd_bit
);
  localparam int unsigned NW = (N + P - 1) / P;
  localparam int unsigned AW = (NW > 1) ? $clog2(NW) : 1;
  localparam int unsigned PW = $clog2(N + 1);

  logic [P-1:0]  mem [NW];
  logic [AW-1:0] waddr, wa;
  logic [PW-1:0] rpos;

  assign wa = wr_first ? '0 : waddr;

  always_ff @(posedge clk)
    if (wr_en) mem[wa] <= wr_data;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      waddr <= '0;
      rpos  <= '0;
    end else begin
      if (wr_en)         waddr <= wa + 1'b1;
      if (rd_start)      rpos  <= PW'(N - 1);
      else if (rd_en)    rpos  <= rpos - 1'b1;
    end

  // Degree rpos sits in word NW-1 - rpos/P, bit rpos%P.
  logic [AW-1:0] raddr;
  logic [P-1:0]  rword;
  assign raddr  = AW'(NW - 1 - int'(rpos) / P);
  assign rword  = mem[raddr];
  assign rd_bit = rword[int'(rpos) % P];

endmodule
