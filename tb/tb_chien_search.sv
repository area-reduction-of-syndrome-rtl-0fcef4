// tb_chien_search: builds sigma(x) = c * prod (1 + beta_l x) for random sets
// of 0 to 18 error positions (c a random nonzero scale) and checks that the
// Chien search flags exactly those positions, in order from degree 254 down
// to 0, over exactly 255 valid clocks with err_last on the final one.
module tb_chien_search;
  import bch_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic start = 0;
  logic [18:0][7:0] sigma = '0;
  logic err_valid, err_bit, err_last;

  always #5 clk = ~clk;

  chien_search dut (.clk, .rst_n, .start, .sigma, .err_valid, .err_bit, .err_last);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    word_t e;
    int w, pos, c;
    int poly [0:18];
    ref_init();
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int n = 0; n < 40; n++) begin
      w = (n < 19) ? n : int'($urandom % 19);
      e = random_errors(w);
      if (n == 1) begin e = '0; e[254] = 1'b1; end
      if (n == 2) begin e = '0; e[0] = 1'b1; end
      for (int j = 0; j <= 18; j++) poly[j] = 0;
      poly[0] = 1;
      for (int d = 0; d < RN; d++)
        if (e[d])
          for (int j = 18; j >= 1; j--) poly[j] = poly[j] ^ rmul(poly[j-1], rpow_alpha(d));
      c = 1 + int'($urandom % 255);
      for (int j = 0; j <= 18; j++) sigma[j] = 8'(rmul(poly[j], c));
      start <= 1'b1;
      @(posedge clk);
      start <= 1'b0;
      pos = 254;
      #1;
      while (err_valid) begin
        check(err_bit == e[pos], $sformatf("position %0d got %0b", pos, err_bit));
        check(err_last == (pos == 0), "err_last");
        pos--;
        @(posedge clk);
        #1;
      end
      check(pos == -1, $sformatf("valid for %0d clocks", 254 - pos));
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
