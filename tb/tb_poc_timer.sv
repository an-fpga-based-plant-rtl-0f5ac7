// tb_poc_timer: measures the spacing of the timer's ticks for several
// periods, the delay from enable to the first tick, the degenerate periods 0
// and 1, and that no tick comes while disabled.
module tb_poc_timer;
  logic clk = 0, rst_n = 0, en = 0, tick;
  logic [31:0] period = 10;
  int checks = 0, failures = 0;
  longint cyc = 0;

  poc_timer dut (.clk, .rst_n, .en, .period, .tick);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic measure(input int p);
    longint t0, t1;
    @(negedge clk) en = 0; period = p;
    @(negedge clk) en = 1;
    t0 = cyc;                         // en is seen at the next edge (cyc+1)
    do @(negedge clk); while (!tick);
    t1 = cyc;
    checks++;
    // first tick: `p` clocks after the edge that sees en
    if (t1 - t0 != ((p < 1) ? 1 : p) + 0) begin
      failures++; $display("FAIL first tick p=%0d after %0d", p, t1 - t0);
    end
    for (int k = 0; k < 5; k++) begin
      t0 = t1;
      do @(negedge clk); while (!tick);
      t1 = cyc;
      checks++;
      if (t1 - t0 != ((p < 1) ? 1 : p)) begin
        failures++; $display("FAIL spacing p=%0d got %0d", p, t1 - t0);
      end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    measure(10);
    measure(37);
    measure(2);
    measure(1);
    measure(0);
    measure(500);
    @(negedge clk) en = 0;
    repeat (2) @(posedge clk);
    for (int k = 0; k < 1000; k++) begin
      @(negedge clk);
      if (tick) begin failures++; $display("FAIL tick while disabled"); break; end
    end
    checks++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
