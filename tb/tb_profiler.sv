// tb_profiler: feeds actuation and sample events to the profiler, decodes
// the serial frames with a behavioural UART receiver, and checks every field:
// sync byte, kind, time stamp (against the testbench's own clock count),
// u or the four state words. Then overfills the FIFO with a burst and a
// simultaneous pair and checks that the drop count and the frames received
// account for every event, in order.
module tb_profiler;
  import poc_pkg::*;

  localparam int DIV = 4, DEPTH = 4;

  logic clk = 0, rst_n = 0, act_ev = 0, smp_ev = 0, txd;
  word_t act_u = 0;
  logic [N-1:0][DATA_W-1:0] smp_x = '0;
  logic [31:0] dropped, sent;
  int checks = 0, failures = 0;
  logic [31:0] tcnt = 0;

  typedef struct {
    byte unsigned kind;
    logic [31:0]  ts;
    logic [31:0]  w [4];
  } exp_t;
  exp_t expq [$];

  profiler #(.FIFO_DEPTH(DEPTH), .BAUD_DIV(DIV)) dut (.*);
  tb_uart_rx_model #(.DIV(DIV)) rx (.clk, .rxd(txd));

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n) tcnt <= tcnt + 1;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %h exp %h", what, got, exp); end
  endtask

  // drive one event for one clock (called at a negedge)
  task automatic ev(input bit is_act, input bit record);
    exp_t e;
    e.ts = tcnt;
    if (is_act) begin
      act_ev = 1; act_u = word_t'($urandom);
      e.kind = 8'h01; e.w[0] = act_u;
    end else begin
      smp_ev = 1;
      for (int k = 0; k < 4; k++) begin smp_x[k] = $urandom; e.w[k] = smp_x[k]; end
      e.kind = 8'h02;
    end
    if (record) expq.push_back(e);
    @(negedge clk) act_ev = 0; smp_ev = 0;
  endtask

  function automatic logic [31:0] get32();
    logic [31:0] v;
    for (int k = 0; k < 4; k++) v = {v[23:0], 8'(rx.get())};
    return v;
  endfunction

  task automatic drain_and_check(input int nframes);
    int bytes;
    bytes = 0;
    foreach (expq[k]) bytes += (expq[k].kind == 8'h01) ? 10 : 22;
    // wait until all bytes arrived (or time out via watchdog)
    while (rx.count() < bytes) @(negedge clk);
    repeat (20*DIV) @(negedge clk);
    chk(rx.count(), bytes, "byte count");
    chk(expq.size(), nframes, "frame count");
    while (expq.size() > 0 && rx.count() > 0) begin
      exp_t e;
      e = expq.pop_front();
      chk(rx.get(), 8'hA5, "sync");
      chk(rx.get(), e.kind, "kind");
      chk(get32(), e.ts, "time stamp");
      chk(get32(), e.w[0], "word 0");
      if (e.kind == 8'h02)
        for (int k = 1; k < 4; k++) chk(get32(), e.w[k], "state word");
    end
    chk(rx.framing_errors, 0, "framing");
  endtask

  initial begin
    int burst_drops;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    repeat (10) @(negedge clk);
    // spaced events: nothing dropped
    for (int t = 0; t < 20; t++) begin
      ev($urandom % 2, 1);
      repeat (900 + $urandom % 100) @(negedge clk);
    end
    drain_and_check(20);
    chk(dropped, 0, "no drops when spaced");
    chk(sent, 20, "sent count");

    // burst of 12 back-to-back events: the first DEPTH+1 fit (one in the
    // serializer, DEPTH in the FIFO), the rest are dropped
    for (int t = 0; t < 12; t++) ev(1, t < DEPTH + 1);
    burst_drops = 12 - (DEPTH + 1);
    repeat (2) @(negedge clk);
    chk(dropped, burst_drops, "burst drops");
    drain_and_check(DEPTH + 1);

    // simultaneous actuation and sample: the sample is dropped
    begin
      exp_t e;
      e.ts = tcnt; e.kind = 8'h01;
      act_ev = 1; smp_ev = 1; act_u = 32'h0BAD_CAFE; e.w[0] = act_u;
      expq.push_back(e);
      @(negedge clk) act_ev = 0; smp_ev = 0;
    end
    repeat (2) @(negedge clk);
    chk(dropped, burst_drops + 1, "simultaneous drop");
    drain_and_check(1);
    chk(sent, 20 + DEPTH + 1 + 1, "sent total");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
