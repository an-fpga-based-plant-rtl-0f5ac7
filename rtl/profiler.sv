// profiler: non-intrusive recorder of the processor's interaction with the
// plant-on-chip. Every actuation (the processor writes u) and every sample
// (the processor reads X) is stamped with a free-running clock-cycle counter,
// queued, and sent to the host over a UART, so that sample-to-actuation delay,
// its jitter and actuator energy can be worked out afterwards without
// disturbing the software under test.
//
// Records wait in a FIFO of FIFO_DEPTH entries. When the FIFO is full a new
// event is not stored and `dropped` counts it; if an actuation and a sample
// arrive in the same clock, the sample is dropped and counted. Each record
// leaves as one frame, bytes sent most significant first:
//   0xA5, kind (0x01 actuation / 0x02 sample), time stamp (4 bytes),
//   then u (4 bytes) for an actuation or theta, theta_dot, x, x_dot
//   (16 bytes) for a sample.
// Time stamps count clocks from reset and wrap at 2^32. `sent` counts frames
// whose last byte has been handed to the UART. Frame layout, FIFO, time-stamp
// unit and drop policy are this design's choices.
module profiler
  import poc_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 16,
  parameter int unsigned BAUD_DIV   = 434
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     act_ev,
  input  word_t                    act_u,
  input  logic                     smp_ev,
  input  logic [N-1:0][DATA_W-1:0] smp_x,
  output logic                     txd,
  output logic [31:0]              dropped,
  output logic [31:0]              sent
);

  localparam int unsigned RW = $bits(ev_rec_t);

  logic [TS_W-1:0] ts;
  ev_rec_t         rec_in, rec_q, head;
  logic            push, full, empty, pop;
  logic [RW-1:0]   head_bits;
  logic            sending;
  logic [4:0]      bidx, blast;
  logic [7:0]      tx_byte;
  logic            tx_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ts <= '0;
    else        ts <= ts + TS_W'(1);
  end

  always_comb begin
    rec_in = '0;
    rec_in.ts = ts;
    if (act_ev) begin
      rec_in.kind    = EV_ACTUATE;
      rec_in.data[0] = act_u;
    end else begin
      rec_in.kind = EV_SAMPLE;
      rec_in.data = smp_x;
    end
  end

  assign push = act_ev || smp_ev;

  sync_fifo #(.WIDTH(RW), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n, .push, .wdata(rec_in), .pop, .rdata(head_bits),
    .full, .empty
  );

  assign head = ev_rec_t'(head_bits);
  assign pop  = !sending && !empty;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) dropped <= '0;
    else dropped <= dropped + 32'(push && full) + 32'(act_ev && smp_ev);
  end

  // Frame serializer.
  assign blast = (rec_q.kind == EV_ACTUATE) ? 5'd9 : 5'd21;

  always_comb begin
    logic [4:0] k;
    k = bidx - 5'd6;
    if (bidx == 5'd0)      tx_byte = FRAME_SYNC;
    else if (bidx == 5'd1) tx_byte = rec_q.kind;
    else if (bidx < 5'd6)  tx_byte = rec_q.ts[8*(5 - bidx) +: 8];
    else                   tx_byte = rec_q.data[k[4:2]][8*(3 - int'(k[1:0])) +: 8];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sending <= 1'b0;
      bidx    <= '0;
      rec_q   <= '0;
      sent    <= '0;
    end else if (pop) begin
      rec_q   <= head;
      bidx    <= '0;
      sending <= 1'b1;
    end else if (sending && tx_ready) begin
      bidx <= bidx + 5'd1;
      if (bidx == blast) begin
        sending <= 1'b0;
        sent    <= sent + 32'd1;
      end
    end
  end

  uart_tx #(.DIV(BAUD_DIV)) u_uart (
    .clk, .rst_n, .data(tx_byte), .valid(sending), .ready(tx_ready), .txd
  );

endmodule
