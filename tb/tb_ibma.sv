// tb_ibma: for random error patterns of 0 to 18 errors, computes the
// syndromes with the reference model, runs the inversionless BMA and checks
// that the degree of sigma equals the number of errors, that sigma_0 is
// nonzero, that sigma vanishes at the inverse of every error locator, and
// that done comes exactly T = 18 clocks after start.
module tb_ibma;
  import bch_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic start = 0;
  logic [35:0][7:0] syn = '0;
  logic done;
  logic [18:0][7:0] sigma;
  logic [5:0] deg;

  always #5 clk = ~clk;

  ibma dut (.clk, .rst_n, .start, .syn, .done, .sigma, .deg);

  function automatic int eval_sigma(input int x);
    int acc, xp;
    acc = 0;
    xp = 1;
    for (int j = 0; j <= 18; j++) begin
      acc = acc ^ rmul(int'(sigma[j]), xp);
      xp = rmul(xp, x);
    end
    return acc;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    word_t e;
    int w, cycles;
    ref_init();
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int n = 0; n < 60; n++) begin
      w = (n < 19) ? n : int'($urandom % 19);
      e = random_errors(w);
      for (int i = 1; i <= 36; i++) syn[i-1] = 8'(ref_syndrome(e, i));
      start <= 1'b1;
      @(posedge clk);
      start <= 1'b0;
      cycles = 0;
      do begin
        @(posedge clk);
        #1;
        cycles++;
      end while (!done && cycles < 100);
      #1;
      check(cycles == 18, $sformatf("latency %0d", cycles));
      check(int'(deg) == w, $sformatf("deg %0d for %0d errors", deg, w));
      check(sigma[0] != 0, "sigma_0 zero");
      for (int d = 0; d < RN; d++)
        if (e[d]) check(eval_sigma(rinv(rpow_alpha(d))) == 0,
                        $sformatf("no root for error at %0d (w=%0d)", d, w));
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
