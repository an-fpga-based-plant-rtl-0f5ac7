// tb_uart_rx_model: behavioural 8N1 receiver for the testbenches. It samples
// each bit in the middle of its DIV-clock period (starting four clocks after
// time zero, once the transmitter is out of reset), checks the stop bit, and
// pushes received bytes into a queue that the testbench reads with get().
module tb_uart_rx_model #(
  parameter int DIV = 434
) (
  input logic clk,
  input logic rxd
);
  byte unsigned q [$];
  int           framing_errors = 0;
  longint       last_start = -1;   // clock count at the latest start bit
  longint       cyc = 0;

  always @(posedge clk) cyc++;

  initial begin
    logic [7:0] b;
    repeat (4) @(posedge clk);       // let the transmitter come out of reset
    forever begin
      @(negedge rxd);
      last_start = cyc;
      repeat (DIV/2) @(posedge clk);
      if (rxd) continue;
      for (int k = 0; k < 8; k++) begin
        repeat (DIV) @(posedge clk);
        b[k] = rxd;
      end
      repeat (DIV) @(posedge clk);
      if (!rxd) framing_errors++;
      q.push_back(b);
    end
  end

  function automatic int count();
    return q.size();
  endfunction

  function automatic byte unsigned get();
    return q.pop_front();
  endfunction
endmodule
