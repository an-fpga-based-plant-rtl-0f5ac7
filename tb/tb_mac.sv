// tb_mac: self-checking test of the multiply-accumulate unit.
// Random dot products of length 1..4 (and saturating extremes) are fed one
// product per clock with clr on the first; the result, read the clock after
// the last product, is compared with wide integer arithmetic.
module tb_mac;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0, en = 0, clr = 0;
  w_t   a = 0, b = 0, result;
  int   checks = 0, failures = 0;

  mac dut (.clk, .rst_n, .en, .clr, .a, .b, .result);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_dot(input int len, input w_t av [4], input w_t bv [4]);
    big_t s = 0;
    w_t   exp;
    for (int k = 0; k < len; k++) begin
      @(negedge clk);
      en = 1; clr = (k == 0); a = av[k]; b = bv[k];
      s += big_t'(av[k]) * big_t'(bv[k]);
    end
    @(negedge clk);
    en = 0; clr = 0;
    a = $urandom; b = $urandom;          // must not disturb the result
    exp = sat32(floor_q24(s));
    checks++;
    if (result !== exp) begin
      failures++;
      $display("FAIL len=%0d got %h exp %h", len, result, exp);
    end
  endtask

  initial begin
    w_t av [4], bv [4];
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 400; t++) begin
      for (int k = 0; k < 4; k++) begin
        // mix of small Q8.24 values and full-range words
        av[k] = (t % 3 == 0) ? w_t'($urandom) : w_t'($signed($urandom) >>> ($urandom % 12));
        bv[k] = (t % 3 == 0) ? w_t'($urandom) : w_t'($signed($urandom) >>> ($urandom % 12));
      end
      run_dot(1 + (t % 4), av, bv);
    end
    // saturation both ways
    av = '{32'sh7fffffff, 32'sh7fffffff, 0, 0}; bv = '{32'sh7fffffff, 32'sh7fffffff, 0, 0};
    run_dot(2, av, bv);
    av = '{32'sh80000000, 32'sh7fffffff, 0, 0}; bv = '{32'sh7fffffff, 32'sh7fffffff, 0, 0};
    run_dot(1, av, bv);
    // exact values: 1.5 * -2.25 = -3.375
    av = '{32'sh01800000, 0, 0, 0}; bv = '{-32'sh02400000, 0, 0, 0};
    run_dot(1, av, bv);
    checks++;
    if (result !== -32'sh03600000) begin failures++; $display("FAIL exact product"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
