// poc_platform: the FPGA side of a cyber-physical-system test bench. A
// plant-on-chip emulator (poc) stands in for a physical plant, by default an
// inverted pendulum on a cart, and advances its state-space model in real
// time; a processor runs the controller against it through a register
// interface (poc_bus_if) exactly as it would against the real sensors and
// actuator; a profiler time-stamps every sample and actuation and streams them
// to a host over a UART, so the effect of the processor's timing jitter on the
// loop can be measured.
//
// The processor itself is outside this module: its data bus is the bus_* port
// group (word address, write, read, one-cycle read latency). prof_txd is the
// profiling data output (8N1 at clock / BAUD_DIV baud). UPDATE_PERIOD is the
// reset value of the emulator's update period in clocks (50,000 = 1 ms at
// 50 MHz, matching the 1 ms step the default A and B were discretised for).
// The clock rate, update step and register map are this design's choices.
module poc_platform
  import poc_pkg::*;
#(
  parameter logic [31:0] UPDATE_PERIOD = 32'd50_000,
  parameter int unsigned BAUD_DIV      = 434,
  parameter int unsigned FIFO_DEPTH    = 16,
  parameter logic [31:0] NOISE_SEED    = 32'h1D2C_3B4A
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [3:0]               bus_address,
  input  logic                     bus_write,
  input  logic [31:0]              bus_writedata,
  input  logic                     bus_read,
  output logic [31:0]              bus_readdata,
  output logic                     bus_readdatavalid,
  output logic                     prof_txd,
  output logic [31:0]              prof_dropped,
  output logic [31:0]              prof_sent,
  output logic                     update_done,
  output logic [N-1:0][DATA_W-1:0] plant_state
);

  logic                 run, noise_en, step_req, init_we, init_ready, busy;
  logic [31:0]          period, update_count;
  word_t                u, init_data, act_u;
  logic [4:0]           noise_shift;
  logic [$clog2(N)-1:0] init_idx;
  logic                 act_ev, smp_ev;
  logic [N-1:0][DATA_W-1:0] x_sample, smp_x;

  poc_bus_if #(.PERIOD_RESET(UPDATE_PERIOD)) u_bus (
    .clk, .rst_n,
    .address(bus_address), .write(bus_write), .writedata(bus_writedata),
    .read(bus_read), .readdata(bus_readdata), .readdatavalid(bus_readdatavalid),
    .run, .noise_en, .step_req, .period, .u, .noise_shift,
    .init_we, .init_idx, .init_data, .init_ready,
    .x_sample, .busy, .update_count,
    .act_ev, .act_u, .smp_ev, .smp_x
  );

  poc #(.NOISE_SEED(NOISE_SEED)) u_poc (
    .clk, .rst_n, .run, .step_req, .period, .u, .noise_en, .noise_shift,
    .init_we, .init_idx, .init_data, .init_ready,
    .x_sample, .busy, .update_done, .update_count
  );

  profiler #(.FIFO_DEPTH(FIFO_DEPTH), .BAUD_DIV(BAUD_DIV)) u_prof (
    .clk, .rst_n, .act_ev, .act_u, .smp_ev, .smp_x,
    .txd(prof_txd), .dropped(prof_dropped), .sent(prof_sent)
  );

  assign plant_state = x_sample;

endmodule
