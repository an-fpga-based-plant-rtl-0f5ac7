// tb_coef_rom: checks the A and B coefficient ROMs against the pendulum model.
// The expected entries are computed here in floating point from the physical
// constants (second-order discretisation, 1 ms step) and must match the ROM
// words to within one LSB of Q8.24. Also checks the one-clock read latency.
module tb_coef_rom;
  import poc_pkg::*;

  logic clk = 0;
  logic [3:0] a_addr = 0;
  logic [1:0] b_addr = 0;
  word_t a_q, b_q;
  int checks = 0, failures = 0;

  coef_rom #(.DEPTH(16), .INIT(A_DEFAULT)) u_a (.clk, .addr(a_addr), .data(a_q));
  coef_rom #(.DEPTH(4),  .INIT(B_DEFAULT)) u_b (.clk, .addr(b_addr), .data(b_q));

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real ac [4][4], a2 [4][4], ad [4][4], bc [4], bd [4];

  task automatic chk(input word_t got, input real expv, input string what);
    real e;
    e = expv * 16777216.0;
    checks++;
    if ($itor(got) > e + 1.0 || $itor(got) < e - 1.0) begin
      failures++;
      $display("FAIL %s got %0d exp %f", what, got, e);
    end
  endtask

  initial begin
    real Mc = 0.5, m = 0.2, bf = 0.1, I = 0.006, g = 9.8, l = 0.3, dt = 1.0e-3, p;
    p = I*(Mc+m) + Mc*m*l*l;
    foreach (ac[i, j]) ac[i][j] = 0.0;
    ac[0][1] = 1.0;
    ac[1][0] = m*g*l*(Mc+m)/p;  ac[1][3] = -m*l*bf/p;
    ac[2][3] = 1.0;
    ac[3][0] = m*m*g*l*l/p;     ac[3][3] = -(I+m*l*l)*bf/p;
    bc = '{0.0, m*l/p, 0.0, (I+m*l*l)/p};
    foreach (a2[i, j]) begin
      a2[i][j] = 0.0;
      for (int k = 0; k < 4; k++) a2[i][j] += ac[i][k]*ac[k][j];
    end
    foreach (ad[i, j]) ad[i][j] = ((i == j) ? 1.0 : 0.0) + ac[i][j]*dt + a2[i][j]*dt*dt/2.0;
    foreach (bd[i]) begin
      bd[i] = bc[i]*dt;
      for (int k = 0; k < 4; k++) bd[i] += ac[i][k]*bc[k]*dt*dt/2.0;
    end

    for (int k = 0; k < 16; k++) begin
      @(negedge clk) a_addr = 4'(k);
      @(posedge clk); #1;
      chk(a_q, ad[k/4][k%4], $sformatf("A[%0d][%0d]", k/4, k%4));
    end
    for (int k = 0; k < 4; k++) begin
      @(negedge clk) b_addr = 2'(k);
      @(posedge clk); #1;
      chk(b_q, bd[k], $sformatf("B[%0d]", k));
    end
    // latency: data changes only at the clock edge after the address
    @(negedge clk) a_addr = 4'd5;
    @(posedge clk); #1;
    @(negedge clk) a_addr = 4'd4;
    #1;
    checks++;
    if (a_q !== A_DEFAULT[5]) begin failures++; $display("FAIL read latency"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
