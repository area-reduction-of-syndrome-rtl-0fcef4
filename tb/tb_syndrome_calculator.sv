// tb_syndrome_calculator: drives random received words and noisy codewords
// into the syndrome calculator at its default size (n = 255, t = 18, 8 bits
// per clock) and compares all 36 syndromes with r(alpha^i) evaluated by the
// reference model, so the directly computed, the even (power) and the odd
// power-derived syndromes S_33, S_35 are all checked. Checks that done comes
// exactly one clock after the 32nd word, with random gaps in in_valid, and
// that a codeword with no errors gives all-zero syndromes. A second instance
// with P = 5 (51 words per codeword, no padding bit) checks that the parallel
// factor is a free parameter.
module tb_syndrome_calculator;
  import bch_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  logic [7:0] in_data = '0;
  logic done;
  logic [35:0][7:0] syn;
  int gaps = 0;

  logic in_valid5 = 0;
  logic [4:0] in_data5 = '0;
  logic done5;
  logic [35:0][7:0] syn5;

  always #5 clk = ~clk;

  syndrome_calculator dut (.clk, .rst_n, .in_valid, .in_data, .done, .syn);
  syndrome_calculator #(.P(5)) dut5 (.clk, .rst_n, .in_valid(in_valid5), .in_data(in_data5),
                                     .done(done5), .syn(syn5));

  task automatic send(input word_t r, input bit with_gaps);
    for (int w = 0; w < 32; w++) begin
      if (with_gaps && ($urandom % 4 == 0)) begin
        in_valid <= 1'b0;
        gaps++;
        @(posedge clk);
      end
      in_valid <= 1'b1;
      in_data  <= r[(31 - w) * 8 +: 8];
      @(posedge clk);
      checks++;
      if (done) begin
        failures++;
        $display("FAIL done early at word %0d", w);
      end
    end
    in_valid <= 1'b0;
    @(posedge clk);
    checks++;
    if (!done) begin
      failures++;
      $display("FAIL done not one clock after last word");
    end
  endtask

  initial begin
    word_t r;
    ref_init();
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int n = 0; n < 30; n++) begin
      case (n % 3)
        0: r = random_word();
        1: r = random_msg_codeword() ^ random_errors(int'($urandom % 19));
        default: r = random_msg_codeword();
      endcase
      send(r, n % 2 == 1);
      #1;
      for (int i = 1; i <= 36; i++) begin
        checks++;
        if (int'(syn[i-1]) != ref_syndrome(r, i)) begin
          failures++;
          if (failures < 10) $display("FAIL cw %0d S%0d got %02h exp %02h", n, i, syn[i-1],
                                      ref_syndrome(r, i));
        end
      end
      if (n % 3 == 2) begin
        checks++;
        if (syn != '0) begin
          failures++;
          $display("FAIL codeword without errors has nonzero syndromes");
        end
      end
    end
    for (int n = 0; n < 6; n++) begin
      r = (n % 2 == 0) ? random_word() : random_msg_codeword() ^ random_errors(n);
      for (int w = 0; w < 51; w++) begin
        in_valid5 <= 1'b1;
        in_data5  <= r[(50 - w) * 5 +: 5];
        @(posedge clk);
      end
      in_valid5 <= 1'b0;
      #1;
      checks++;
      if (!done5) failures++;
      for (int i = 1; i <= 36; i++) begin
        checks++;
        if (int'(syn5[i-1]) != ref_syndrome(r, i)) begin
          failures++;
          if (failures < 10) $display("FAIL P=5 S%0d", i);
        end
      end
    end
    checks++;
    if (gaps == 0) failures++;
    $display("input gaps exercised: %0d", gaps);
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
