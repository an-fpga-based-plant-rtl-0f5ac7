// uart_tx: serial transmitter that carries the profiler's records to the
// host. Its shift register is the UART register through which the
// time-stamped values leave the chip.
//
// Frames are 8N1 (start bit, eight data bits LSB first, one stop bit), each
// bit DIV clocks long: DIV = clock / baud, 434 for 115200 baud at 50 MHz.
// Handshake: a byte is taken when valid && ready; ready is high when the
// transmitter is idle and in the last clock of a stop bit, so with valid held
// high consecutive frames start exactly 10*DIV clocks apart. txd idles high.
// Frame format, baud rate and handshake are this design's choices.
module uart_tx #(
  parameter int unsigned DIV = 434
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [7:0] data,
  input  logic       valid,
  output logic       ready,
  output logic       txd
);

  localparam int unsigned CW = (DIV > 1) ? $clog2(DIV) : 1;

  logic [9:0]    shreg;    // stop, data[7:0], start; bit 0 is on the line
  logic [3:0]    nbits;    // bits left in the frame
  logic [CW-1:0] cnt;

  logic idle, last_clk;

  // ready also in the last clock of a stop bit, so frames can follow back to back
  assign idle     = (nbits == 4'd0);
  assign last_clk = (nbits == 4'd1) && (cnt == CW'(DIV - 1));
  assign ready    = idle || last_clk;
  assign txd      = idle ? 1'b1 : shreg[0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shreg <= '1;
      nbits <= '0;
      cnt   <= '0;
    end else if (ready && valid) begin
      shreg <= {1'b1, data, 1'b0};
      nbits <= 4'd10;
      cnt   <= '0;
    end else if (idle) begin
      cnt <= '0;
    end else if (cnt == CW'(DIV - 1)) begin
      cnt   <= '0;
      shreg <= {1'b1, shreg[9:1]};
      nbits <= nbits - 4'd1;
    end else begin
      cnt <= cnt + CW'(1);
    end
  end

  // A byte offered and not yet taken stays offered, unchanged.
  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
                           valid && !ready |=> valid && $stable(data));

endmodule
