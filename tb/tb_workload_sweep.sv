// tb_workload_sweep: the delay/sample-period sweep the platform is meant for.
//
// For sample periods h of 1, 2, 5, 10, 15 and 20 ms and computation delays of 0%,
// 50% and 100% of h, the testbench (acting as the processor) starts the
// pendulum 0.05 rad off upright with a random disturbance injected into the
// cart position, runs a state-feedback controller for 2 s of plant time, and
// accumulates a quadratic cost (1/T) * sum(theta^2 + x^2 + 0.01*u^2) * dt and
// the actuator energy sum(|u * x_dot|) * dt from the sampled values, as the
// host would in post-processing. Plant steps are 50 clocks apart here (the
// model step is still 1 ms).
// Checked: the emulator state after every update bit for bit against the
// reference model (with the u and disturbance in effect), and that at the
// longest period the cost grows with the delay. The table of cost and energy
// is printed.
module tb_workload_sweep;
  import poc_pkg::*;
  import tb_ref_pkg::*;

  localparam int PERIOD = 50, UPD_LAT = 36, NSHIFT = 20;
  localparam logic [31:0] SEED = 32'h1D2C_3B4A;

  logic clk = 0, rst_n = 0;
  logic [3:0] bus_address = 0;
  logic bus_write = 0, bus_read = 0, bus_readdatavalid, prof_txd, update_done;
  logic [31:0] bus_writedata = 0, bus_readdata, prof_dropped, prof_sent;
  logic [N-1:0][DATA_W-1:0] plant_state;

  int checks = 0, failures = 0;
  longint cyc = 0;

  poc_platform #(.UPDATE_PERIOD(PERIOD), .BAUD_DIV(2), .FIFO_DEPTH(4), .NOISE_SEED(SEED)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    repeat (4_000_000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  w_t a_ref [16], b_ref [4], xr [4];
  logic [31:0] lfsr_s = SEED;
  w_t u_cur = 0, u_prev = 0;
  longint u_edge = -1;
  bit noise_on = 0;
  int n_updates = 0, n_mismatch = 0;

  // u in effect at an update: the update latches u UPD_LAT-1 edges before done
  always @(negedge clk) begin
    if (rst_n && update_done) begin
      w_t nz, ue;
      nz = w_t'($signed(lfsr_s) >>> NSHIFT);
      ue = (u_edge < cyc - UPD_LAT + 1) ? u_cur : u_prev;
      plant_step(a_ref, b_ref, ue, noise_on, nz, xr);
      lfsr_s = lfsr_next(lfsr_s);
      n_updates++;
      checks++;
      if (plant_state != {xr[3], xr[2], xr[1], xr[0]}) begin
        failures++; n_mismatch++;
        if (n_mismatch < 5) $display("FAIL state after update %0d", n_updates);
      end
    end
  end

  task automatic wr(input reg_addr_e a, input logic [31:0] d);
    @(negedge clk) bus_address = a; bus_writedata = d; bus_write = 1;
    @(negedge clk) bus_write = 0;
    if (a == REG_U) begin u_prev = u_cur; u_cur = w_t'(d); u_edge = cyc; end
  endtask

  task automatic rd(input reg_addr_e a, output logic [31:0] d);
    @(negedge clk) bus_address = a; bus_read = 1;
    @(negedge clk) bus_read = 0;
    d = bus_readdata;
  endtask

  real K [4] = '{18.6854, 3.4594, -1.0, -1.6567};

  function automatic real q(input w_t v);
    return $itor(v) / 16777216.0;
  endfunction

  task automatic run_one(input int h_ms, input int pct, output real cost, output real energy);
    logic [31:0] d;
    w_t x [4];
    longint t0;
    int h, dly, ncyc;
    real uf;
    h = h_ms * PERIOD;
    dly = pct * h / 100;
    // stop, wait for idle, load the initial state and zero input
    wr(REG_CTRL, 32'h0);
    repeat (UPD_LAT + 4) @(negedge clk);
    wr(REG_U, 0); u_prev = 0;
    xr = '{32'sh000ccccd, 0, 0, 0};
    for (int k = 0; k < 4; k++) wr(reg_addr_e'(4 + k), xr[k]);
    noise_on = 1;
    wr(REG_CTRL, 32'h3);
    t0 = cyc;
    cost = 0.0; energy = 0.0;
    ncyc = 2000 / h_ms;
    for (int c = 0; c < ncyc; c++) begin
      while (cyc < t0 + longint'(c) * h) @(negedge clk);
      rd(REG_X0, d); x[0] = d;
      for (int k = 1; k < 4; k++) begin rd(reg_addr_e'(4 + k), d); x[k] = d; end
      // the input applied during this period is the previous one
      cost   += (q(x[0])*q(x[0]) + q(x[2])*q(x[2]) + 0.01*q(u_cur)*q(u_cur)) * h_ms * 1.0e-3;
      energy += ((q(u_cur)*q(x[3]) < 0) ? -q(u_cur)*q(x[3]) : q(u_cur)*q(x[3])) * h_ms * 1.0e-3;
      uf = 0.0;
      for (int k = 0; k < 4; k++) uf += -K[k] * q(x[k]);
      if (uf > 100.0) uf = 100.0;
      if (uf < -100.0) uf = -100.0;
      if (dly > 10) repeat (dly - 10) @(negedge clk);
      wr(REG_U, w_t'($rtoi(uf * 16777216.0)));
    end
    cost = cost / 2.0;
    // stop the timer but keep the disturbance on for an update still running
    wr(REG_CTRL, 32'h2);
    repeat (UPD_LAT + 4) @(negedge clk);
    wr(REG_CTRL, 32'h0);
    noise_on = 0;
  endtask

  initial begin
    int hs [6] = '{1, 2, 5, 10, 15, 20};
    int ps [3] = '{0, 50, 100};
    real cost [6][3], energy [6][3];
    logic [31:0] d;
    for (int k = 0; k < 16; k++) a_ref[k] = A_DEFAULT[k];
    for (int k = 0; k < 4; k++) begin b_ref[k] = B_DEFAULT[k]; xr[k] = 0; end
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    repeat (10) @(negedge clk);
    wr(REG_NOISE, NSHIFT);
    for (int i = 0; i < 6; i++)
      for (int j = 0; j < 3; j++) begin
        run_one(hs[i], ps[j], cost[i][j], energy[i][j]);
        $display("h = %0d ms, delay = %0d%% of h: cost %f, actuator energy %f J", hs[i], ps[j], cost[i][j], energy[i][j]);
      end
    checks++;
    if (!(cost[5][2] > cost[5][0])) begin failures++; $display("FAIL cost does not grow with delay at h = 20 ms"); end
    checks++;
    if (n_updates < 24000) begin failures++; $display("FAIL too few updates %0d", n_updates); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
