// tb_uart_tx: sends random bytes through the transmitter and receives them
// with a behavioural receiver; checks the data, the stop bit, the idle level,
// the bit time and the ready/valid handshake (10*DIV clocks per byte).
module tb_uart_tx;
  localparam int DIV = 8;

  logic clk = 0, rst_n = 0, valid = 0, ready, txd;
  logic [7:0] data = 0;
  int checks = 0, failures = 0;
  longint cyc = 0;
  byte unsigned sent [$];

  uart_tx #(.DIV(DIV)) dut (.clk, .rst_n, .data, .valid, .ready, .txd);
  tb_uart_rx_model #(.DIV(DIV)) rx (.clk, .rxd(txd));

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint t0, t1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (10) @(negedge clk);
    checks++;
    if (!txd || !ready) begin failures++; $display("FAIL idle state"); end
    // bursts with valid held high: one byte every 10*DIV clocks
    for (int burst = 0; burst < 6; burst++) begin
      int n;
      n = 0;
      data = 8'($urandom); valid = 1;
      #1;
      while (n < 20) begin
        // between edges: a byte is taken at the next edge if ready
        if (ready) begin
          sent.push_back(data);
          t1 = cyc;
          if (n > 0) begin
            checks++;
            if (t1 - t0 != 10*DIV) begin failures++; $display("FAIL byte time %0d", t1 - t0); end
          end
          t0 = t1;
          n++;
          @(posedge clk); #1 data = 8'($urandom);   // next byte after the handshake
        end else begin
          @(posedge clk); #1;
        end
      end
      valid = 0;
      repeat ($urandom % 50) @(negedge clk);
    end
    while (!ready) @(negedge clk);
    repeat (2*DIV) @(negedge clk);
    checks++;
    if (rx.count() != sent.size()) begin failures++; $display("FAIL count %0d vs %0d", rx.count(), sent.size()); end
    while (rx.count() > 0 && sent.size() > 0) begin
      byte unsigned g, e;
      g = rx.get(); e = sent.pop_front();
      checks++;
      if (g != e) begin failures++; $display("FAIL byte got %h exp %h", g, e); end
    end
    checks++;
    if (rx.framing_errors != 0) begin failures++; $display("FAIL framing"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
