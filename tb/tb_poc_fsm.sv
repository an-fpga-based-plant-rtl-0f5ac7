// tb_poc_fsm: watches every control output of the update controller through
// the post-reset clear and three updates. Checks the order of the phases,
// the address presented one clock before each use (synchronous memories),
// the MAC clear pattern, the noise select, the write addresses, and the
// 36-clock update time.
module tb_poc_fsm;
  logic clk = 0, rst_n = 0, start = 0;
  logic busy, idle, done, u_load, mac_en, mac_clr, mac_sel_ax, ub_we, ax_we, xnew_we;
  logic add_noise, oldx_we, oldx_clear, sample_we, sample_commit, noise_step;
  logic [3:0] a_addr;
  logic [1:0] b_addr, oldx_raddr, sum_raddr, xnew_raddr, res_waddr, xnew_waddr, oldx_waddr, sample_idx;
  int checks = 0, failures = 0;

  poc_fsm dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d exp %0d", what, got, exp); end
  endtask

  task automatic one_update();
    int cyc, n_ub_mac, n_ax_mac, n_ub, n_ax, n_xn, n_cp, n_commit, n_noise, last_ub, last_ax, last_xn, first_xn, first_cp;
    int done_at, first_ax_w;
    logic [3:0] pa; logic [1:0] pb, pox, psum, pxn;
    n_ub_mac = 0; n_ax_mac = 0; n_ub = 0; n_ax = 0; n_xn = 0; n_cp = 0; n_commit = 0; n_noise = 0;
    done_at = -1; last_ub = -1; last_ax = -1; last_xn = -1; first_xn = 999; first_cp = 999; first_ax_w = 999;
    @(negedge clk);
    expect_eq(idle, 1, "idle before start");
    start = 1;
    #1 expect_eq(u_load, 1, "u_load with start");
    pa = a_addr; pb = b_addr; pox = oldx_raddr; psum = sum_raddr; pxn = xnew_raddr;
    for (cyc = 1; cyc <= 45; cyc++) begin
      @(negedge clk);
      start = 0;
      if (mac_en && !mac_sel_ax) begin
        expect_eq(pb, n_ub_mac, "b_addr order");
        expect_eq(mac_clr, 1, "clr on u*B");
        n_ub_mac++;
      end
      if (mac_en && mac_sel_ax) begin
        expect_eq(pa, n_ax_mac, "a_addr order");
        expect_eq(pox, n_ax_mac % 4, "old X address");
        expect_eq(mac_clr, (n_ax_mac % 4) == 0, "clr on row start");
        n_ax_mac++;
      end
      if (ub_we) begin expect_eq(res_waddr, n_ub, "uB write addr"); n_ub++; last_ub = cyc; end
      if (ax_we) begin
        expect_eq(res_waddr, n_ax, "AX write addr");
        n_ax++; last_ax = cyc; if (first_ax_w == 999) first_ax_w = cyc;
      end
      if (xnew_we) begin
        expect_eq(xnew_waddr, n_xn, "Xnew write addr");
        expect_eq(psum, n_xn, "uB/AX read addr");
        expect_eq(add_noise, n_xn == 2, "noise on x only");
        n_xn++; last_xn = cyc; if (first_xn == 999) first_xn = cyc;
      end
      if (sample_we) begin
        expect_eq(oldx_we, 1, "old X written in copy");
        expect_eq(oldx_clear, 0, "no clear in copy");
        expect_eq(oldx_waddr, n_cp, "old X write addr");
        expect_eq(sample_idx, n_cp, "sample index");
        expect_eq(pxn, n_cp, "Xnew read addr");
        if (sample_commit) begin n_commit++; expect_eq(n_cp, 3, "commit on last"); end
        n_cp++; if (first_cp == 999) first_cp = cyc;
      end
      if (noise_step) n_noise++;
      if (done && done_at < 0) done_at = cyc;
      if (cyc <= 36) expect_eq(busy, 1, "busy during update");
      pa = a_addr; pb = b_addr; pox = oldx_raddr; psum = sum_raddr; pxn = xnew_raddr;
    end
    expect_eq(n_ub_mac, 4, "u*B products");
    expect_eq(n_ax_mac, 16, "A*X products");
    expect_eq(n_ub, 4, "uB writes");
    expect_eq(n_ax, 4, "AX writes");
    expect_eq(n_xn, 4, "Xnew writes");
    expect_eq(n_cp, 4, "copies");
    expect_eq(n_commit, 1, "sample commits");
    expect_eq(n_noise, 1, "noise steps");
    expect_eq(done_at, 36, "update latency");
    expect_eq(last_ub < first_ax_w, 1, "uB before AX");
    expect_eq(last_ax < first_xn, 1, "AX written before add reads");
    expect_eq(last_xn < first_cp, 1, "Xnew written before copy reads");
    expect_eq(idle, 1, "idle after");
  endtask

  initial begin
    int n_clr;
    n_clr = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int k = 0; k < 8; k++) begin
      #1;
      if (oldx_we && oldx_clear) begin expect_eq(oldx_waddr, n_clr, "clear addr"); n_clr++; end
      @(negedge clk);
    end
    expect_eq(n_clr, 4, "post-reset clear");
    expect_eq(idle, 1, "idle after clear");
    repeat (3) one_update();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
