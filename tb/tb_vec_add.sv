// tb_vec_add: random and extreme operands for the saturating vector adder,
// with and without the noise term, against wide integer sums.
module tb_vec_add;
  import tb_ref_pkg::*;

  w_t ub, ax, noise, y;
  logic add_noise;
  int checks = 0, failures = 0;

  vec_add dut (.ub, .ax, .noise, .add_noise, .y);

  task automatic one(input w_t a, input w_t b, input w_t c, input logic n);
    w_t e;
    ub = a; ax = b; noise = c; add_noise = n;
    #1;
    e = sadd(a, b, n ? c : 32'sd0);
    checks++;
    if (y !== e) begin failures++; $display("FAIL %h+%h+%h(%b) got %h exp %h", a, b, c, n, y, e); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 3000; t++)
      one(w_t'($urandom), w_t'($urandom), w_t'($urandom), 1'($urandom));
    one(32'sh7fffffff, 32'sh7fffffff, 32'sh7fffffff, 1);
    one(32'sh80000000, 32'sh80000000, 32'sh80000000, 1);
    one(32'sh7fffffff, 1, 0, 0);
    one(32'sh80000000, -1, 0, 0);
    one(32'sh01000000, 32'sh02000000, 32'sh7fffffff, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
