// poc_bus_if: processor-side register interface of the plant-on-chip.
//
// A simple memory-mapped slave (word addresses, see reg_addr_e in poc_pkg):
// the processor writes the control input u (the Control Input reg), the run /
// noise / single-step controls, the update period, the noise amplitude and an
// initial state, and reads the sampled state vector. Reading X0 copies all four
// words of the Sample Reg into a read latch and returns theta; X1..X3 then
// return the rest of that same sample, so one sample is always one instant of
// the plant. Each u write and each X0 read is reported to the profiler
// (act_ev / smp_ev, one-cycle pulses with the values).
//
// Timing: writes take effect at the clock edge; readdata is valid with
// readdatavalid one clock after read. An initial-state write is held until the
// emulator is idle (init_ready) and then passed on; a second write to the same
// path before that replaces the first. The register map and bus timing are
// this design's choices; the published design only says the processor writes u and may
// sample X at any time.
module poc_bus_if
  import poc_pkg::*;
#(
  parameter logic [31:0] PERIOD_RESET = 32'd50_000
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // processor bus
  input  logic [3:0]               address,
  input  logic                     write,
  input  logic [31:0]              writedata,
  input  logic                     read,
  output logic [31:0]              readdata,
  output logic                     readdatavalid,
  // to / from the emulator
  output logic                     run,
  output logic                     noise_en,
  output logic                     step_req,
  output logic [31:0]              period,
  output word_t                    u,
  output logic [4:0]               noise_shift,
  output logic                     init_we,
  output logic [$clog2(N)-1:0]     init_idx,
  output word_t                    init_data,
  input  logic                     init_ready,
  input  logic [N-1:0][DATA_W-1:0] x_sample,
  input  logic                     busy,
  input  logic [31:0]              update_count,
  // to the profiler
  output logic                     act_ev,
  output word_t                    act_u,
  output logic                     smp_ev,
  output logic [N-1:0][DATA_W-1:0] smp_x
);

  localparam int unsigned IW = $clog2(N);

  logic [N-1:0][DATA_W-1:0] x_latch;
  logic                     init_pend;
  reg_addr_e                addr;

  assign addr = reg_addr_e'(address);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run           <= 1'b0;
      noise_en      <= 1'b0;
      step_req      <= 1'b0;
      period        <= PERIOD_RESET;
      u             <= '0;
      noise_shift   <= 5'd16;
      init_pend     <= 1'b0;
      init_idx      <= '0;
      init_data     <= '0;
      x_latch       <= '0;
      readdata      <= '0;
      readdatavalid <= 1'b0;
      act_ev        <= 1'b0;
      act_u         <= '0;
      smp_ev        <= 1'b0;
      smp_x         <= '0;
    end else begin
      step_req      <= 1'b0;
      act_ev        <= 1'b0;
      smp_ev        <= 1'b0;
      readdatavalid <= 1'b0;
      if (init_pend && init_ready) init_pend <= 1'b0;

      if (write) begin
        unique case (addr)
          REG_CTRL: begin
            run      <= writedata[0];
            noise_en <= writedata[1];
            step_req <= writedata[2];
          end
          REG_U: begin
            u      <= word_t'(writedata);
            act_ev <= 1'b1;
            act_u  <= word_t'(writedata);
          end
          REG_PERIOD: period <= writedata;
          REG_X0, REG_X1, REG_X2, REG_X3: begin
            init_pend <= 1'b1;
            init_idx  <= IW'(address - 4'(REG_X0));
            init_data <= word_t'(writedata);
          end
          REG_NOISE: noise_shift <= writedata[4:0];
          default: ;
        endcase
      end

      if (read) begin
        readdatavalid <= 1'b1;
        unique case (addr)
          REG_CTRL:   readdata <= {29'd0, 1'b0, noise_en, run};
          REG_U:      readdata <= u;
          REG_PERIOD: readdata <= period;
          REG_STATUS: readdata <= {update_count[23:0], 7'd0, busy};
          REG_X0: begin
            x_latch  <= x_sample;
            readdata <= x_sample[0];
            smp_ev   <= 1'b1;
            smp_x    <= x_sample;
          end
          REG_X1, REG_X2, REG_X3: readdata <= x_latch[address - 4'(REG_X0)];
          REG_NOISE:  readdata <= {27'd0, noise_shift};
          default:    readdata <= '0;
        endcase
      end
    end
  end

  assign init_we = init_pend;

  // The bus carries one access per cycle.
  a_one_access: assert property (@(posedge clk) disable iff (!rst_n) !(read && write));

endmodule
