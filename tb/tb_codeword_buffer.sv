// tb_codeword_buffer: writes random 255-bit words into the buffer, 8 bits
// per clock, and reads them back one bit per clock from degree 254 down to
// 0, comparing every bit. The next word is written with wr_first while the
// old one was fully read, so the write pointer restart is exercised too.
module tb_codeword_buffer;
  import bch_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic wr_en = 0, wr_first = 0, rd_start = 0, rd_en = 0;
  logic [7:0] wr_data = '0;
  logic rd_bit;

  always #5 clk = ~clk;

  codeword_buffer dut (.clk, .rst_n, .wr_en, .wr_first, .wr_data, .rd_start, .rd_en, .rd_bit);

  initial begin
    word_t r;
    ref_init();
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int n = 0; n < 10; n++) begin
      r = random_word();
      for (int w = 0; w < 32; w++) begin
        wr_en    <= 1'b1;
        wr_first <= (w == 0);
        wr_data  <= r[(31 - w) * 8 +: 8];
        @(posedge clk);
      end
      wr_en <= 1'b0;
      wr_first <= 1'b0;
      rd_start <= 1'b1;
      @(posedge clk);
      rd_start <= 1'b0;
      for (int d = 254; d >= 0; d--) begin
        #1;
        checks++;
        if (rd_bit != r[d]) begin
          failures++;
          if (failures < 10) $display("FAIL degree %0d", d);
        end
        rd_en <= 1'b1;
        @(posedge clk);
        rd_en <= 1'b0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
