// tb_poc: the plant-on-chip emulator against a reference model.
// Loads initial states, applies control inputs, and compares the Sample Reg
// bit for bit with tb_ref_pkg::plant_step after every update: single steps,
// timer-paced runs (checking the period between updates), steps with the
// disturbance enabled, and a saturating state. Also checks the 36-clock
// update time and that initial-state writes are held off while busy.
module tb_poc;
  import poc_pkg::*;
  import tb_ref_pkg::*;

  localparam logic [31:0] SEED = 32'h1D2C_3B4A;

  logic clk = 0, rst_n = 0, run = 0, step_req = 0, noise_en = 0, init_we = 0, init_ready;
  logic [31:0] period = 100;
  word_t u = 0, init_data = 0;
  logic [4:0] noise_shift = 10;
  logic [1:0] init_idx = 0;
  logic [N-1:0][DATA_W-1:0] x_sample;
  logic busy, update_done;
  logic [31:0] update_count;
  int checks = 0, failures = 0;
  longint cyc = 0;

  w_t xr [4];
  w_t a_ref [16], b_ref [4];
  logic [31:0] lfsr_s = SEED;

  poc #(.NOISE_SEED(SEED)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare(input string what);
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (w_t'(x_sample[k]) !== xr[k]) begin
        failures++;
        $display("FAIL %s X[%0d] got %h exp %h", what, k, x_sample[k], xr[k]);
      end
    end
  endtask

  task automatic set_state(input w_t v [4]);
    for (int k = 0; k < 4; k++) begin
      @(negedge clk);
      init_we = 1; init_idx = 2'(k); init_data = v[k];
      while (!init_ready) @(negedge clk);
      @(negedge clk) init_we = 0;
    end
    xr = v;
    #1 compare("init");
  endtask

  // Reference for one update; the noise word is the LFSR state before the step.
  task automatic ref_update(input w_t uu);
    w_t nz;
    nz = w_t'($signed(lfsr_s) >>> noise_shift);
    plant_step(a_ref, b_ref, uu, noise_en, nz, xr);
    lfsr_s = lfsr_next(lfsr_s);
  endtask

  task automatic single_step(input w_t uu);
    longint t0;
    @(negedge clk);
    u = uu; step_req = 1;
    t0 = cyc;
    @(negedge clk) step_req = 0; u = w_t'($urandom);  // u only matters at start
    while (!update_done) @(negedge clk);
    checks++;
    if (cyc - t0 != 36) begin failures++; $display("FAIL update time %0d", cyc - t0); end
    ref_update(uu);
    @(negedge clk);
    compare("step");
  endtask

  initial begin
    w_t v [4];
    longint tprev;
    for (int k = 0; k < 16; k++) a_ref[k] = A_DEFAULT[k];
    for (int k = 0; k < 4; k++)  b_ref[k] = B_DEFAULT[k];
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (6) @(posedge clk);
    xr = '{0, 0, 0, 0};
    compare("reset");

    // free response from a tilted pendulum, no input
    v = '{32'sh000ccccd, 0, 0, 0};   // 0.05 rad
    set_state(v);
    for (int t = 0; t < 20; t++) single_step(0);
    // random inputs and states
    for (int t = 0; t < 30; t++) begin
      for (int k = 0; k < 4; k++) v[k] = w_t'($signed($urandom) >>> 6);
      if (t % 5 == 0) set_state(v);
      single_step(w_t'($signed($urandom) >>> 4));
    end
    // disturbance on the cart position
    noise_en = 1;
    for (int t = 0; t < 20; t++) single_step(w_t'($signed($urandom) >>> 8));
    noise_en = 0;
    // saturation: state near full scale
    v = '{32'sh7f000000, 32'sh7f000000, 32'sh7f000000, 32'sh7f000000};
    set_state(v);
    single_step(32'sh7fffffff);
    single_step(32'sh80000000);

    // timer-paced run; init writes are refused while busy
    @(negedge clk) period = 100; u = 32'sh00100000; run = 1;
    tprev = -1;
    for (int t = 0; t < 10; t++) begin
      while (!busy) @(negedge clk);
      checks++;
      if (init_ready) begin failures++; $display("FAIL init_ready while busy"); end
      while (!update_done) @(negedge clk);
      if (tprev >= 0) begin
        checks++;
        if (cyc - tprev != 100) begin failures++; $display("FAIL period %0d", cyc - tprev); end
      end
      tprev = cyc;
      ref_update(32'sh00100000);
      @(negedge clk) compare("run");
    end
    run = 0;
    checks++;
    if (update_count != 20 + 30 + 20 + 2 + 10) begin failures++; $display("FAIL update_count %0d", update_count); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
