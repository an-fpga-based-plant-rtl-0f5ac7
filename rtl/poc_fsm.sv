// poc_fsm: controller that sequences one state update of the plant-on-chip
// emulator, X <- A*X + B*u, over the shared multiply-accumulator.
//
// After reset it first clears the old-state RAM (CLEAR, N cycles). An update
// starts on `start` from IDLE and runs four phases, in the order the plant
// emulator is specified:
//   UB   : for i in 0..N-1, uB[i] = B[i]*u            (one MAC product each)
//   AX   : for i, j in 0..N-1, AX[i] = sum_j A[i][j]*X[j]  (N-long dot products)
//   ADD  : Xnew[i] = uB[i] + AX[i] (+ noise for the cart position)
//   COPY : X[i] = Xnew[i]; the Sample Reg takes all of Xnew at once
// Memories read synchronously, so each issued read travels down a two-stage
// tag pipeline: stage 1 (data on the memory outputs: MAC enable, or the Xnew /
// old-X write for ADD and COPY) and stage 2 (MAC result valid: the uB / AX
// write). UB and AX issue back to back; before ADD and COPY the pipeline is
// drained so each phase reads what the previous one wrote.
//
// Timing: an update takes 36 clocks from the start cycle to the done pulse
// (1 + 4 UB + 16 AX + 3 drain + 4 ADD + 2 drain + 4 COPY + 2 drain); `busy` is
// high for the 36 clocks after start. The two-stage pipeline and the resulting
// count are this design's own.
module poc_fsm
  import poc_pkg::*;
#(
  parameter int unsigned NS = N,
  localparam int unsigned IW = (NS > 1) ? $clog2(NS) : 1,
  localparam int unsigned AAW = $clog2(NS*NS)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  output logic           busy,          // update (or post-reset clear) in progress
  output logic           idle,          // ready for start and for initial-state writes
  output logic           done,          // one-cycle pulse: update finished
  output logic           u_load,        // latch the control input
  // coefficient ROM and vector RAM read addresses
  output logic [AAW-1:0] a_addr,
  output logic [IW-1:0]  b_addr,
  output logic [IW-1:0]  oldx_raddr,
  output logic [IW-1:0]  sum_raddr,     // uB and AX RAMs, ADD phase
  output logic [IW-1:0]  xnew_raddr,
  // multiply-accumulator
  output logic           mac_en,
  output logic           mac_clr,
  output logic           mac_sel_ax,    // 0: B*u, 1: A*X
  // writes
  output logic           ub_we,
  output logic           ax_we,
  output logic [IW-1:0]  res_waddr,     // uB / AX write address
  output logic           xnew_we,
  output logic [IW-1:0]  xnew_waddr,
  output logic           add_noise,
  output logic           oldx_we,       // COPY or CLEAR write of old X
  output logic           oldx_clear,    // oldx write data is zero
  output logic [IW-1:0]  oldx_waddr,
  output logic           sample_we,     // COPY: stage Xnew[sample_idx]
  output logic           sample_commit, // with sample_we: last element, publish all
  output logic [IW-1:0]  sample_idx,
  output logic           noise_step
);

  typedef enum logic [3:0] {
    S_CLEAR, S_IDLE, S_UB, S_AX, S_WAIT_AX, S_ADD, S_WAIT_ADD, S_COPY, S_WAIT_COPY, S_DONE
  } state_e;

  typedef enum logic [1:0] {OP_UB, OP_AX, OP_ADD, OP_COPY} op_e;

  typedef struct packed {
    logic          valid;
    op_e           op;
    logic [IW-1:0] idx;
    logic          first;
    logic          last;
  } tag_t;

  state_e        state;
  logic [IW-1:0] i, j;
  tag_t          issue, p1, p2;

  wire last_i = (i == IW'(NS-1));
  wire last_j = (j == IW'(NS-1));

  // Stage-0 tag for the read issued this cycle.
  always_comb begin
    issue = '0;
    unique case (state)
      S_UB:   issue = '{valid: 1'b1, op: OP_UB,   idx: i, first: 1'b1,     last: 1'b1};
      S_AX:   issue = '{valid: 1'b1, op: OP_AX,   idx: i, first: j == '0,  last: last_j};
      S_ADD:  issue = '{valid: 1'b1, op: OP_ADD,  idx: i, first: 1'b1,     last: 1'b1};
      S_COPY: issue = '{valid: 1'b1, op: OP_COPY, idx: i, first: i == '0,  last: last_i};
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_CLEAR;
      i     <= '0;
      j     <= '0;
      p1    <= '0;
      p2    <= '0;
    end else begin
      p1 <= issue;
      p2 <= (p1.valid && (p1.op == OP_UB || p1.op == OP_AX)) ? p1 : '0;
      unique case (state)
        S_CLEAR: begin
          i <= i + IW'(1);
          if (last_i) begin i <= '0; state <= S_IDLE; end
        end
        S_IDLE: if (start) begin i <= '0; j <= '0; state <= S_UB; end
        S_UB: begin
          i <= i + IW'(1);
          if (last_i) begin i <= '0; j <= '0; state <= S_AX; end
        end
        S_AX: begin
          j <= j + IW'(1);
          if (last_j) begin
            j <= '0;
            i <= i + IW'(1);
            if (last_i) begin i <= '0; state <= S_WAIT_AX; end
          end
        end
        S_WAIT_AX:  if (!p1.valid && !p2.valid) state <= S_ADD;
        S_ADD: begin
          i <= i + IW'(1);
          if (last_i) begin i <= '0; state <= S_WAIT_ADD; end
        end
        S_WAIT_ADD: if (!p1.valid) state <= S_COPY;
        S_COPY: begin
          i <= i + IW'(1);
          if (last_i) begin i <= '0; state <= S_WAIT_COPY; end
        end
        S_WAIT_COPY: if (!p1.valid) state <= S_DONE;
        S_DONE:      state <= S_IDLE;
        default:     state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    idle   = (state == S_IDLE);
    busy   = !idle;
    done   = (state == S_DONE);
    u_load = idle && start;
    noise_step = done;

    a_addr     = AAW'(i) * AAW'(NS) + AAW'(j);
    b_addr     = i;
    oldx_raddr = j;
    sum_raddr  = i;
    xnew_raddr = i;

    mac_en     = p1.valid && (p1.op == OP_UB || p1.op == OP_AX);
    mac_clr    = p1.first;
    mac_sel_ax = (p1.op == OP_AX);

    ub_we      = p2.valid && p2.last && (p2.op == OP_UB);
    ax_we      = p2.valid && p2.last && (p2.op == OP_AX);
    res_waddr  = p2.idx;

    xnew_we    = p1.valid && (p1.op == OP_ADD);
    xnew_waddr = p1.idx;
    add_noise  = (p1.idx == IW'(IDX_X));

    sample_we     = p1.valid && (p1.op == OP_COPY);
    sample_commit = sample_we && p1.last;
    sample_idx    = p1.idx;

    oldx_clear = (state == S_CLEAR);
    oldx_we    = oldx_clear || sample_we;
    oldx_waddr = oldx_clear ? i : p1.idx;
  end

endmodule
