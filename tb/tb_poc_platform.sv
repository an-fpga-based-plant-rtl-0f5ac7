// tb_poc_platform: end-to-end test of the plant-on-chip platform.
//
// The testbench plays the processor: a behavioural state-feedback controller
// (u = -K*X, gains for the inverted pendulum) that samples X over the bus
// every 15 plant updates (a 15 ms control period) and writes u after a
// computation delay of 15%, 65%, 85% and then 90% of that period, as in the
// delay experiments this platform was built for. Plant updates run 200
// clocks apart here to keep the simulation short; each is still a 1 ms model
// step. Checked:
//  - the plant state after every update, bit for bit, against a reference
//    model fed with the u in effect when the update started (36 clocks
//    before the done pulse);
//  - the controlled pendulum settles back towards upright;
//  - every profiler frame: samples carry the values the bus returned,
//    actuations the values written, and time stamps differ exactly by the
//    clocks between the bus accesses (sample-to-actuation delay);
//  - single step, disturbance injection, an initial-state write held off
//    while busy, and a burst of samples that overflows the profiler FIFO.
// Each of these mechanisms is counted; one that never happened is a failure.
module tb_poc_platform;
  import poc_pkg::*;
  import tb_ref_pkg::*;

  localparam int PERIOD = 200, DIV = 4, DEPTH = 4;
  localparam int UPD_LAT = 36;
  localparam logic [31:0] SEED = 32'h1D2C_3B4A;

  logic clk = 0, rst_n = 0;
  logic [3:0] bus_address = 0;
  logic bus_write = 0, bus_read = 0, bus_readdatavalid, prof_txd, update_done;
  logic [31:0] bus_writedata = 0, bus_readdata, prof_dropped, prof_sent;
  logic [N-1:0][DATA_W-1:0] plant_state;

  int checks = 0, failures = 0;
  longint cyc = 0;

  poc_platform #(.UPDATE_PERIOD(PERIOD), .BAUD_DIV(DIV), .FIFO_DEPTH(DEPTH), .NOISE_SEED(SEED)) dut (.*);
  tb_uart_rx_model #(.DIV(DIV)) rx (.clk, .rxd(prof_txd));

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %0h exp %0h (cycle %0d)", what, got, exp, cyc); end
  endtask

  // ---------------- reference plant ----------------
  w_t a_ref [16], b_ref [4], xr [4];
  logic [31:0] lfsr_s = SEED;
  w_t     u_hist_val [$];
  longint u_hist_edge [$];     // edge at which the u register took the value;
                               // an update latches u at the edge UPD_LAT-1 before done
  bit     noise_on = 0;
  int     noise_shift = 16;
  w_t     init_pending [4];
  bit     init_pending_v [4];
  int n_updates = 0, n_noise_updates = 0, n_steps = 0, n_init_busy = 0;
  int n_samples = 0, n_acts = 0;
  bit check_state = 1;

  function automatic w_t u_at(input longint start_edge);
    w_t v = 0;
    foreach (u_hist_edge[k]) if (u_hist_edge[k] < start_edge) v = u_hist_val[k];
    return v;
  endfunction

  always @(negedge clk) begin
    if (rst_n && update_done) begin
      w_t nz;
      nz = w_t'($signed(lfsr_s) >>> noise_shift);
      plant_step(a_ref, b_ref, u_at(cyc - UPD_LAT + 1), noise_on, nz, xr);
      lfsr_s = lfsr_next(lfsr_s);
      n_updates++;
      if (noise_on) n_noise_updates++;
      if (check_state)
        for (int k = 0; k < 4; k++) chk(plant_state[k], xr[k], $sformatf("state X[%0d] after update %0d", k, n_updates));
      // initial-state writes that waited for the update take effect now
      for (int k = 0; k < 4; k++) if (init_pending_v[k]) begin xr[k] = init_pending[k]; init_pending_v[k] = 0; end
    end
  end

  // ---------------- bus master ----------------
  typedef struct { byte unsigned kind; logic [31:0] ts; logic [31:0] w [4]; longint edge_no; } fr_t;
  fr_t expq [$];

  task automatic wr(input reg_addr_e a, input logic [31:0] d);
    @(negedge clk) bus_address = a; bus_writedata = d; bus_write = 1;
    @(negedge clk) bus_write = 0;
    if (a == REG_U) begin
      fr_t f;
      u_hist_val.push_back(w_t'(d));
      u_hist_edge.push_back(cyc);
      f.kind = 8'h01; f.w[0] = d; f.edge_no = cyc; f.ts = 0;
      expq.push_back(f);
      n_acts++;
    end
  endtask

  task automatic rd(input reg_addr_e a, output logic [31:0] d);
    longint e;
    @(negedge clk) bus_address = a; bus_read = 1;
    @(negedge clk) bus_read = 0;
    e = cyc;
    chk(bus_readdatavalid, 1, "readdatavalid");
    d = bus_readdata;
  endtask

  // Sample: X0 read latches the vector, X1..X3 return the rest.
  task automatic sample(output w_t x [4], input bit record);
    logic [31:0] d;
    fr_t f;
    rd(REG_X0, d); x[0] = d; f.edge_no = cyc;
    for (int k = 1; k < 4; k++) begin rd(reg_addr_e'(4 + k), d); x[k] = d; end
    f.kind = 8'h02; f.ts = 0;
    for (int k = 0; k < 4; k++) f.w[k] = x[k];
    if (record) expq.push_back(f);
    n_samples++;
  endtask

  // ---------------- frame checker ----------------
  function automatic logic [31:0] get32();
    logic [31:0] v;
    for (int k = 0; k < 4; k++) v = {v[23:0], 8'(rx.get())};
    return v;
  endfunction

  int n_frames = 0;
  bit have_ref = 0;
  longint ref_edge;
  logic [31:0] ref_ts;

  task automatic check_frames();
    int bytes;
    bytes = 0;
    foreach (expq[k]) bytes += (expq[k].kind == 8'h01) ? 10 : 22;
    while (rx.count() < bytes) @(negedge clk);
    repeat (12*DIV) @(negedge clk);
    chk(rx.count(), bytes, "profiler byte count");
    while (expq.size() > 0 && rx.count() > 0) begin
      fr_t e;
      logic [31:0] ts;
      e = expq.pop_front();
      chk(rx.get(), 8'hA5, "frame sync");
      chk(rx.get(), e.kind, "frame kind");
      ts = get32();
      // time stamps advance exactly with the bus accesses that caused them
      if (have_ref) chk(ts - ref_ts, 32'(e.edge_no - ref_edge), "time stamp spacing");
      have_ref = 1; ref_ts = ts; ref_edge = e.edge_no;
      chk(get32(), e.w[0], "frame word 0");
      if (e.kind == 8'h02) for (int k = 1; k < 4; k++) chk(get32(), e.w[k], "frame state word");
      n_frames++;
    end
    chk(rx.framing_errors, 0, "framing errors");
  endtask

  // ---------------- controller ----------------
  // LQR gains for X = [theta, theta_dot, x, x_dot]; u = -K*X.
  real K [4] = '{18.6854, 3.4594, -1.0, -1.6567};

  function automatic w_t control(input w_t x [4]);
    real uf = 0.0;
    for (int k = 0; k < 4; k++) uf += -K[k] * ($itor(x[k]) / 16777216.0);
    if (uf > 100.0) uf = 100.0;
    if (uf < -100.0) uf = -100.0;
    return w_t'($rtoi(uf * 16777216.0));
  endfunction

  initial begin
    logic [31:0] d;
    w_t x [4], x0 [4];
    longint t_loop;
    int pct [4] = '{15, 65, 85, 90};
    int h = 15 * PERIOD;
    real theta_max_late;
    int drops_before;

    for (int k = 0; k < 16; k++) a_ref[k] = A_DEFAULT[k];
    for (int k = 0; k < 4; k++) begin b_ref[k] = B_DEFAULT[k]; xr[k] = 0; init_pending_v[k] = 0; end
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    repeat (10) @(negedge clk);

    rd(REG_PERIOD, d); chk(d, PERIOD, "period after reset");
    // tilt the pendulum by 0.05 rad
    x0 = '{32'sh000ccccd, 0, 0, 0};
    for (int k = 0; k < 4; k++) wr(reg_addr_e'(4 + k), x0[k]);
    repeat (2) @(negedge clk);
    xr = x0;
    sample(x, 1);
    for (int k = 0; k < 4; k++) chk(x[k], x0[k], "initial state read back");

    // single steps
    wr(REG_U, 32'sh00200000);
    for (int s = 0; s < 3; s++) begin
      int n_prev;
      n_prev = n_updates;
      wr(REG_CTRL, 32'h4);
      repeat (UPD_LAT + 4) @(negedge clk);
      chk(n_updates, n_prev + 1, "single step ran one update");
      rd(REG_STATUS, d);
      chk(d[31:8], 24'(n_updates), "update count in status");
      if (n_updates == n_prev + 1) n_steps++;
    end
    check_frames();

    // closed loop, timer paced; delay as a fraction of the control period
    wr(REG_CTRL, 32'h1);
    t_loop = cyc;
    theta_max_late = 0.0;
    for (int c = 0; c < 200; c++) begin
      int dly;
      dly = pct[c / 50] * h / 100;
      while (cyc < t_loop + longint'(c) * h) @(negedge clk);
      sample(x, 1);
      repeat (dly - 8) @(negedge clk);
      wr(REG_U, control(x));
      if (c >= 150) begin
        real th;
        th = $itor(x[0]) / 16777216.0;
        if (th < 0) th = -th;
        if (th > theta_max_late) theta_max_late = th;
      end
      if (c % 10 == 9) begin
        check_frames();
        $display("control period %0d delay %0d%%: theta %f rad, x %f m", c, pct[c / 50],
                 $itor(x[0]) / 16777216.0, $itor(x[2]) / 16777216.0);
      end
    end
    check_frames();
    // the pendulum starts 0.05 rad off; after 2 s under control it is near upright
    checks++;
    if (theta_max_late > 0.01) begin failures++; $display("FAIL pendulum not settled: %f rad", theta_max_late); end

    // initial-state write arriving while an update is in progress
    @(negedge clk);
    while (!update_done) @(negedge clk);
    repeat (PERIOD - UPD_LAT + 5) @(negedge clk);        // inside the next update
    rd(REG_STATUS, d); chk(d[0], 1, "busy during update");
    init_pending[2] = 32'sh00800000; init_pending_v[2] = 1;  // x = 0.5 m
    wr(REG_X2, 32'sh00800000);
    n_init_busy++;
    repeat (PERIOD) @(negedge clk);
    chk(init_pending_v[2], 0, "held write applied after the update");

    // disturbance on the cart position
    @(negedge clk);
    while (!update_done) @(negedge clk);
    wr(REG_CTRL, 32'h0);
    repeat (PERIOD) @(negedge clk);
    noise_shift = 12;
    wr(REG_NOISE, 12);
    noise_on = 1;
    wr(REG_CTRL, 32'h3);
    repeat (20 * PERIOD) @(negedge clk);
    while (!update_done) @(negedge clk);
    wr(REG_CTRL, 32'h0);
    noise_on = 0;
    repeat (PERIOD) @(negedge clk);

    // burst of samples: more than the profiler FIFO holds
    drops_before = prof_dropped;
    for (int k = 0; k < 3 * DEPTH; k++) sample(x, k < DEPTH + 1);
    repeat (4) @(negedge clk);
    chk(prof_dropped - drops_before, 3 * DEPTH - (DEPTH + 1), "profiler drops in burst");
    have_ref = 0;
    check_frames();
    chk(prof_sent, n_frames, "frames sent");

    $display("mechanisms: updates=%0d single_steps=%0d noise_updates=%0d samples=%0d actuations=%0d init_while_busy=%0d frames=%0d drops=%0d",
             n_updates, n_steps, n_noise_updates, n_samples, n_acts, n_init_busy, n_frames, prof_dropped);
    if (n_updates == 0 || n_steps == 0 || n_noise_updates == 0 || n_samples == 0 || n_acts == 0 ||
        n_init_busy == 0 || n_frames == 0 || prof_dropped == 0) begin
      failures++; $display("FAIL a mechanism never happened");
    end
    checks++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
