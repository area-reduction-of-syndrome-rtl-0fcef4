// tb_sc_direct_unit: feeds random received words, 8 bits per clock highest
// degree first, into direct syndrome units for S_1, S_7 and S_31 and
// compares each result with r(alpha^i) from the reference model. Also checks
// that a codeword takes exactly 32 clocks and that the 'first' flag starts
// a new codeword back to back.
module tb_sc_direct_unit;
  import bch_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic en = 0, first = 0;
  logic [7:0] din = '0;
  logic [7:0] s1, s7, s31;

  always #5 clk = ~clk;

  sc_direct_unit #(.I(1))  u1  (.clk, .rst_n, .en, .first, .din, .syn(s1));
  sc_direct_unit #(.I(7))  u7  (.clk, .rst_n, .en, .first, .din, .syn(s7));
  sc_direct_unit #(.I(31)) u31 (.clk, .rst_n, .en, .first, .din, .syn(s31));

  task automatic check(input logic [7:0] got, input int exp_v, input string what);
    checks++;
    if (int'(got) != exp_v) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %02h exp %02h", what, got, exp_v);
    end
  endtask

  task automatic send(input word_t r);
    int cycles = 0;
    for (int w = 0; w < 32; w++) begin
      en    <= 1'b1;
      first <= (w == 0);
      din   <= r[(31 - w) * 8 +: 8];
      @(posedge clk);
      cycles++;
    end
    en <= 1'b0;
    first <= 1'b0;
    checks++;
    if (cycles != 32) failures++;
  endtask

  initial begin
    word_t r;
    ref_init();
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int n = 0; n < 40; n++) begin
      case (n)
        0: r = '0;
        1: begin r = '0; r[0] = 1'b1; end
        2: begin r = '0; r[254] = 1'b1; end
        default: r = random_word();
      endcase
      send(r);
      #1;
      check(s1, ref_syndrome(r, 1), "S1");
      check(s7, ref_syndrome(r, 7), "S7");
      check(s31, ref_syndrome(r, 31), "S31");
      if (n % 3 == 0) @(posedge clk);   // sometimes an idle clock between codewords
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
