// tb_bch_decoder: end-to-end test of the BCH(255,111,18) decoder at its
// default parameters. Random messages are encoded with g(x) by the reference
// model, 0 to 18 random bit errors are added, and the received words go in
// 8 bits per clock. The corrected bits that come out are compared with the
// transmitted codeword, and the first output bit must appear exactly T+2 = 20
// clocks after the last input word was taken, followed by 255 consecutive
// bits with out_last on the last. Mechanisms counted, each of which must
// occur: codewords without errors, with exactly t = 18 errors, with errors
// in between, gaps in the input stream, input held off while the decoder is
// busy, and a codeword accepted right after the previous one left.
module tb_bch_decoder;
  import bch_ref_pkg::*;

  localparam int NCW = 40;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready;
  logic [7:0] in_data = '0;
  logic out_valid, out_bit, out_last;

  int cyc = 0;
  int last_word_cyc [$];
  word_t expected [$];

  int n_clean = 0, n_full_t = 0, n_some = 0, n_gap = 0, n_held = 0, n_back2back = 0;
  int n_done = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  bch_decoder dut (.clk, .rst_n, .in_valid, .in_ready, .in_data, .out_valid, .out_bit, .out_last);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  // Driver: all signal changes at the falling edge; a word is taken at the
  // next rising edge if in_ready is high.
  initial begin
    word_t v, r;
    int w;
    bit taken;
    ref_init();
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < NCW; n++) begin
      v = random_msg_codeword();
      case (n % 4)
        0: w = 0;
        1: w = 18;
        default: w = 1 + int'($urandom % 17);
      endcase
      if (w == 0) n_clean++; else if (w == 18) n_full_t++; else n_some++;
      r = v ^ random_errors(w);
      expected.push_back(v);
      if (n % 5 == 3) repeat (300) @(negedge clk);   // let the decoder go idle first
      for (int k = 0; k < 32; k++) begin
        if (n % 2 == 1 && k > 0 && $urandom % 3 == 0) begin
          in_valid = 1'b0;
          n_gap++;
          @(negedge clk);
        end
        in_valid = 1'b1;
        in_data  = r[(31 - k) * 8 +: 8];
        do begin
          taken = in_ready;
          if (!taken) n_held++;
          @(negedge clk);
        end while (!taken);
      end
      last_word_cyc.push_back(cyc - 1);
      in_valid = 1'b0;
    end
  end

  // Monitor: compares every output bit with the transmitted codeword.
  initial begin
    word_t v;
    int pos, lw, prev_end;
    prev_end = -10;
    forever begin
      @(negedge clk);
      if (out_valid) begin
        v  = expected.pop_front();
        lw = last_word_cyc.pop_front();
        check(cyc - 1 - lw == 20, $sformatf("latency %0d", cyc - 1 - lw));
        if (lw == prev_end + 32) n_back2back++;
        pos = 254;
        while (out_valid) begin
          check(out_bit == v[pos], $sformatf("codeword %0d bit %0d", n_done, pos));
          check(out_last == (pos == 0), "out_last");
          pos--;
          @(negedge clk);
        end
        check(pos == -1, $sformatf("%0d output bits", 254 - pos));
        prev_end = cyc - 1;
        n_done++;
        if (n_done == NCW) begin
          $display("codewords: clean %0d, t errors %0d, 1..t-1 errors %0d", n_clean, n_full_t,
                   n_some);
          $display("input gaps %0d, clocks held off %0d, back-to-back %0d", n_gap, n_held,
                   n_back2back);
          check(n_clean > 0, "no error-free codeword");
          check(n_full_t > 0, "no codeword with t errors");
          check(n_some > 0, "no codeword with fewer than t errors");
          check(n_gap > 0, "no input gap");
          check(n_held > 0, "input never held off");
          check(n_back2back > 0, "no back-to-back codeword");
          $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
          $finish;
        end
      end
    end
  end

  initial begin
    repeat (40 * 700) @(posedge clk);
    failures++;
    $display("watchdog: %0d of %0d codewords done", n_done, NCW);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
