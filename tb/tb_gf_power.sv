// tb_gf_power: checks the power-operation unit y = x^(2^K) for K = 1, 2, 5
// and 7 against repeated squaring with table arithmetic, on all 256 inputs.
module tb_gf_power;
  import bch_ref_pkg::*;

  int checks = 0, failures = 0;
  logic [7:0] x;
  logic [7:0] y1, y2, y5, y7;

  gf_power #(.K(1)) u1 (.x(x), .y(y1));
  gf_power #(.K(2)) u2 (.x(x), .y(y2));
  gf_power #(.K(5)) u5 (.x(x), .y(y5));
  gf_power #(.K(7)) u7 (.x(x), .y(y7));

  function automatic int sq_k(input int a, input int k);
    for (int i = 0; i < k; i++) a = rmul(a, a);
    return a;
  endfunction

  task automatic check(input logic [7:0] got, input int exp_v, input int k);
    checks++;
    if (int'(got) != exp_v) begin
      failures++;
      if (failures < 10) $display("FAIL x=%02h K=%0d got %02h exp %02h", x, k, got, exp_v);
    end
  endtask

  initial begin
    ref_init();
    for (int v = 0; v < 256; v++) begin
      x = 8'(v);
      #1;
      check(y1, sq_k(v, 1), 1);
      check(y2, sq_k(v, 2), 2);
      check(y5, sq_k(v, 5), 5);
      check(y7, sq_k(v, 7), 7);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
