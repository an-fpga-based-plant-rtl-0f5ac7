// poc: plant-on-chip emulator. It holds a discrete state-space model
// X[k+1] = A*X[k] + B*u[k] of the plant (by default the inverted pendulum on a
// cart, X = [theta, theta_dot, x, x_dot]) and advances it once per timer
// period, so a processor can sample and actuate it as it would a real plant.
//
// Structure, following the plant emulator's description: a Control Input reg
// (the u input, latched when an update starts), an Old X RAM, an A ROM and a
// B ROM, one multiply-accumulator, a uB RAM, an AX RAM, a vector adder, an
// Xnew RAM, a Sample Reg, a period timer and the FSM (poc_fsm) that sequences
// them. The update computes u*B, then A*X row by row, then their sum (plus an
// optional disturbance on the cart position from noise_lfsr), and finally
// copies Xnew into the Old X RAM and into the Sample Reg in one step, so the
// processor always reads a complete state vector.
//
// Interface: run enables the timer (one update every `period` clocks);
// step_req starts one update now if idle. init_we writes element init_idx of
// the state (old X and Sample Reg) and is accepted only when init_ready
// (controller idle). x_sample is the Sample Reg. An update takes 36 clocks
// (see poc_fsm); update_done pulses at its end and update_count counts them.
// The period must be at least 37 clocks; a timer tick during an update is
// lost (an assertion flags it in simulation).
// Word format (Q8.24), RAM timing and the noise generator are this design's
// choices.
module poc
  import poc_pkg::*;
#(
  parameter word_t       A_INIT [N*N] = A_DEFAULT,
  parameter word_t       B_INIT [N]   = B_DEFAULT,
  parameter logic [31:0] NOISE_SEED   = 32'h1D2C_3B4A
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     run,
  input  logic                     step_req,
  input  logic [31:0]              period,
  input  word_t                    u,
  input  logic                     noise_en,
  input  logic [4:0]               noise_shift,
  input  logic                     init_we,
  input  logic [$clog2(N)-1:0]     init_idx,
  input  word_t                    init_data,
  output logic                     init_ready,
  output logic [N-1:0][DATA_W-1:0] x_sample,
  output logic                     busy,
  output logic                     update_done,
  output logic [31:0]              update_count
);

  localparam int unsigned IW  = $clog2(N);
  localparam int unsigned AAW = $clog2(N*N);

  logic           tick, start, idle;
  logic           u_load, mac_en, mac_clr, mac_sel_ax;
  logic           ub_we, ax_we, xnew_we, add_noise, oldx_we, oldx_clear;
  logic           sample_we, sample_commit, noise_step;
  logic [AAW-1:0] a_addr;
  logic [IW-1:0]  b_addr, oldx_raddr, sum_raddr, xnew_raddr;
  logic [IW-1:0]  res_waddr, xnew_waddr, oldx_waddr, sample_idx;
  word_t          a_q, b_q, oldx_q, ub_q, ax_q, xnew_q;
  word_t          u_q, mac_a, mac_b, mac_res, sum, noise;
  word_t          oldx_wdata;
  logic           oldx_we_any;
  logic [IW-1:0]  oldx_waddr_any;
  word_t          stage [N];

  poc_timer u_timer (.clk, .rst_n, .en(run), .period, .tick);

  assign start = tick || step_req;

  poc_fsm u_fsm (
    .clk, .rst_n, .start, .busy, .idle, .done(update_done), .u_load,
    .a_addr, .b_addr, .oldx_raddr, .sum_raddr, .xnew_raddr,
    .mac_en, .mac_clr, .mac_sel_ax,
    .ub_we, .ax_we, .res_waddr, .xnew_we, .xnew_waddr, .add_noise,
    .oldx_we, .oldx_clear, .oldx_waddr,
    .sample_we, .sample_commit, .sample_idx, .noise_step
  );

  // Control Input reg: u is held for the whole update.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      u_q <= '0;
    else if (u_load) u_q <= u;
  end

  coef_rom #(.DEPTH(N*N), .INIT(A_INIT)) u_a_rom (.clk, .addr(a_addr), .data(a_q));
  coef_rom #(.DEPTH(N),   .INIT(B_INIT)) u_b_rom (.clk, .addr(b_addr), .data(b_q));

  assign mac_a = mac_sel_ax ? a_q : b_q;
  assign mac_b = mac_sel_ax ? oldx_q : u_q;

  mac u_mac (.clk, .rst_n, .en(mac_en), .clr(mac_clr), .a(mac_a), .b(mac_b), .result(mac_res));

  vec_ram u_ub_ram (.clk, .we(ub_we), .waddr(res_waddr), .wdata(mac_res),
                    .raddr(sum_raddr), .rdata(ub_q));
  vec_ram u_ax_ram (.clk, .we(ax_we), .waddr(res_waddr), .wdata(mac_res),
                    .raddr(sum_raddr), .rdata(ax_q));

  noise_lfsr #(.SEED(NOISE_SEED)) u_noise (.clk, .rst_n, .step(noise_step),
                                           .shift(noise_shift), .noise);

  vec_add u_add (.ub(ub_q), .ax(ax_q), .noise, .add_noise(add_noise && noise_en), .y(sum));

  vec_ram u_xnew_ram (.clk, .we(xnew_we), .waddr(xnew_waddr), .wdata(sum),
                      .raddr(xnew_raddr), .rdata(xnew_q));

  // Old X RAM: cleared after reset, loaded from Xnew at the end of an update,
  // or written by the processor while the controller is idle.
  assign init_ready = idle;

  always_comb begin
    oldx_we_any    = oldx_we || (init_we && idle);
    oldx_waddr_any = oldx_we ? oldx_waddr : init_idx;
    if (oldx_clear)   oldx_wdata = '0;
    else if (oldx_we) oldx_wdata = xnew_q;
    else              oldx_wdata = init_data;
  end

  vec_ram u_oldx_ram (.clk, .we(oldx_we_any), .waddr(oldx_waddr_any), .wdata(oldx_wdata),
                      .raddr(oldx_raddr), .rdata(oldx_q));

  // Sample Reg: staged element by element during COPY, published at once.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_sample     <= '0;
      update_count <= '0;
      for (int k = 0; k < N; k++) stage[k] <= '0;
    end else begin
      if (sample_we) begin
        stage[sample_idx] <= xnew_q;
        if (sample_commit)
          for (int k = 0; k < N; k++)
            x_sample[k] <= (IW'(k) == sample_idx) ? xnew_q : stage[k];
      end else if (init_we && idle) begin
        x_sample[init_idx] <= init_data;
      end
      if (update_done) update_count <= update_count + 32'd1;
    end
  end

  // The update period must cover an update (PERIOD >= 37): a tick that
  // arrives while busy would be lost.
  a_no_lost_tick: assert property (@(posedge clk) disable iff (!rst_n) tick |-> idle);

endmodule
