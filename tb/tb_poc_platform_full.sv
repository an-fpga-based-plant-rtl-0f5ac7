// tb_poc_platform_full: one complete operation of the platform with every
// parameter at its default (1 ms plant step = 50,000 clocks, 434 clocks per
// UART bit, 16-entry profiler FIFO).
//
// The testbench loads a tilted-pendulum state, starts the timer, waits for
// the first timer-paced update and checks its timing (50,000 clocks after
// run) and its result against the reference model, then samples X, writes a
// control input, and decodes both profiler frames at 115200-baud timing,
// checking their contents and the sample-to-actuation time-stamp difference.
// A second update then has to apply that input.
module tb_poc_platform_full;
  import poc_pkg::*;
  import tb_ref_pkg::*;

  localparam int PERIOD = 50_000, DIV = 434;
  localparam logic [31:0] SEED = 32'h1D2C_3B4A;

  logic clk = 0, rst_n = 0;
  logic [3:0] bus_address = 0;
  logic bus_write = 0, bus_read = 0, bus_readdatavalid, prof_txd, update_done;
  logic [31:0] bus_writedata = 0, bus_readdata, prof_dropped, prof_sent;
  logic [N-1:0][DATA_W-1:0] plant_state;

  int checks = 0, failures = 0;
  longint cyc = 0;

  poc_platform dut (.*);
  tb_uart_rx_model #(.DIV(DIV)) rx (.clk, .rxd(prof_txd));

  always #10 clk = ~clk;   // 50 MHz
  always @(posedge clk) cyc++;

  initial begin
    repeat (1_000_000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %0h exp %0h", what, got, exp); end
  endtask

  task automatic wr(input reg_addr_e a, input logic [31:0] d);
    @(negedge clk) bus_address = a; bus_writedata = d; bus_write = 1;
    @(negedge clk) bus_write = 0;
  endtask

  task automatic rd(input reg_addr_e a, output logic [31:0] d);
    @(negedge clk) bus_address = a; bus_read = 1;
    @(negedge clk) bus_read = 0;
    chk(bus_readdatavalid, 1, "readdatavalid");
    d = bus_readdata;
  endtask

  function automatic logic [31:0] get32();
    logic [31:0] v;
    for (int k = 0; k < 4; k++) v = {v[23:0], 8'(rx.get())};
    return v;
  endfunction

  initial begin
    w_t a_ref [16], b_ref [4], xr [4], xs [4];
    logic [31:0] d, ts_s, ts_a;
    longint t_run, t_done, e_smp, e_act;
    w_t u1 = 32'sh00400000;   // 0.25 N

    for (int k = 0; k < 16; k++) a_ref[k] = A_DEFAULT[k];
    for (int k = 0; k < 4; k++)  b_ref[k] = B_DEFAULT[k];
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    repeat (10) @(negedge clk);

    rd(REG_PERIOD, d); chk(d, PERIOD, "default period");
    xr = '{32'sh000ccccd, 32'sh00000000, 32'sh00000000, 32'sh00000000};
    for (int k = 0; k < 4; k++) wr(reg_addr_e'(4 + k), xr[k]);
    repeat (2) @(negedge clk);

    wr(REG_CTRL, 32'h1);
    t_run = cyc;            // run was taken at this edge
    while (!update_done) @(negedge clk);
    t_done = cyc;
    // the timer ticks PERIOD clocks after run; the done pulse follows 36 clocks after the tick
    chk(32'(t_done - t_run), PERIOD + 36, "first update time");
    plant_step(a_ref, b_ref, 0, 0, 0, xr);
    @(negedge clk);
    for (int k = 0; k < 4; k++) chk(plant_state[k], xr[k], "state after first update");

    rd(REG_X0, d); xs[0] = d; e_smp = cyc;
    for (int k = 1; k < 4; k++) begin rd(reg_addr_e'(4 + k), d); xs[k] = d; end
    for (int k = 0; k < 4; k++) chk(xs[k], xr[k], "sampled state");
    repeat (100) @(negedge clk);
    wr(REG_U, u1); e_act = cyc;

    // second update applies u1
    while (!update_done) @(negedge clk);
    plant_step(a_ref, b_ref, u1, 0, 0, xr);
    @(negedge clk);
    for (int k = 0; k < 4; k++) chk(plant_state[k], xr[k], "state after second update");

    // both frames: 22 + 10 bytes
    while (rx.count() < 32) @(negedge clk);
    chk(rx.get(), 8'hA5, "sync");
    chk(rx.get(), 8'h02, "sample kind");
    ts_s = get32();
    for (int k = 0; k < 4; k++) chk(get32(), xs[k], "sample word");
    chk(rx.get(), 8'hA5, "sync");
    chk(rx.get(), 8'h01, "actuation kind");
    ts_a = get32();
    chk(get32(), u1, "actuation value");
    chk(ts_a - ts_s, 32'(e_act - e_smp), "sample-to-actuation time");
    chk(rx.framing_errors, 0, "framing");
    chk(prof_dropped, 0, "no drops");
    chk(prof_sent, 2, "frames sent");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
