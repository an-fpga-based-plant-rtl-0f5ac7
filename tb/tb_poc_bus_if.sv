// tb_poc_bus_if: drives the processor bus of the register interface and
// checks every register: control bits and the single-step pulse, u and its
// actuation event, period, noise shift, status, initial-state writes held
// until the emulator is ready, and the coherent sample latch (X0 read takes
// all four words, X1..X3 return that sample even after the state moves on).
module tb_poc_bus_if;
  import poc_pkg::*;

  logic clk = 0, rst_n = 0;
  logic [3:0] address = 0;
  logic write = 0, read = 0, readdatavalid;
  logic [31:0] writedata = 0, readdata;
  logic run, noise_en, step_req, init_we, init_ready = 1, busy = 0, act_ev, smp_ev;
  logic [31:0] period, update_count = 0;
  word_t u, init_data, act_u;
  logic [4:0] noise_shift;
  logic [1:0] init_idx;
  logic [N-1:0][DATA_W-1:0] x_sample = '0, smp_x;
  int checks = 0, failures = 0;
  int n_act = 0, n_smp = 0, n_step = 0;

  poc_bus_if #(.PERIOD_RESET(32'd1234)) dut (.*);

  always #5 clk = ~clk;

  // events are one clock long: count them in the middle of the clock
  always @(negedge clk) begin
    if (rst_n && act_ev) n_act++;
    if (rst_n && smp_ev) n_smp++;
    if (rst_n && step_req) n_step++;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %h exp %h", what, got, exp); end
  endtask

  task automatic wr(input reg_addr_e a, input logic [31:0] d);
    @(negedge clk) address = a; writedata = d; write = 1;
    @(negedge clk) write = 0;
    #1;
  endtask

  task automatic rd(input reg_addr_e a, output logic [31:0] d);
    @(negedge clk) address = a; read = 1;
    @(negedge clk) read = 0;
    #1;
    chk(readdatavalid, 1, "readdatavalid");
    d = readdata;
    @(negedge clk) #1 chk(readdatavalid, 0, "readdatavalid drops");
  endtask

  initial begin
    logic [31:0] d;
    repeat (2) @(posedge clk);
    rst_n = 1;
    rd(REG_PERIOD, d);  chk(d, 1234, "period reset");
    chk(run, 0, "run reset");
    wr(REG_PERIOD, 777); chk(period, 777, "period");
    rd(REG_PERIOD, d);   chk(d, 777, "period read");
    wr(REG_CTRL, 32'h3); chk({noise_en, run}, 2'b11, "ctrl");
    rd(REG_CTRL, d);     chk(d, 3, "ctrl read");
    wr(REG_CTRL, 32'h4); chk({noise_en, run}, 2'b00, "ctrl clear");
    chk(n_step, 1, "one step pulse");
    wr(REG_NOISE, 32'd7); chk(noise_shift, 7, "noise shift");
    wr(REG_U, 32'hDEAD_BEEF);
    chk(u, 32'hDEAD_BEEF, "u");
    chk(act_u, 32'hDEAD_BEEF, "act_u");
    chk(n_act, 1, "actuation event");
    rd(REG_U, d); chk(d, 32'hDEAD_BEEF, "u read");
    busy = 1; update_count = 32'h12345;
    rd(REG_STATUS, d); chk(d, {24'h012345, 8'h01}, "status");
    busy = 0;
    // initial state write held while not ready
    init_ready = 0;
    wr(REG_X2, 32'h0ABC_0000);
    repeat (3) begin @(negedge clk); chk(init_we, 1, "init held"); end
    chk(init_idx, 2, "init idx"); chk(init_data, 32'h0ABC_0000, "init data");
    init_ready = 1;
    @(negedge clk); #1 chk(init_we, 0, "init released");
    // coherent sample
    x_sample = {32'h4444_4444, 32'h3333_3333, 32'h2222_2222, 32'h1111_1111};
    rd(REG_X0, d); chk(d, 32'h1111_1111, "X0");
    chk(n_smp, 1, "sample event");
    chk(smp_x, {32'h4444_4444, 32'h3333_3333, 32'h2222_2222, 32'h1111_1111}, "smp_x");
    x_sample = {32'h8888_8888, 32'h7777_7777, 32'h6666_6666, 32'h5555_5555};
    rd(REG_X1, d); chk(d, 32'h2222_2222, "X1 of latched sample");
    rd(REG_X2, d); chk(d, 32'h3333_3333, "X2 of latched sample");
    rd(REG_X3, d); chk(d, 32'h4444_4444, "X3 of latched sample");
    chk(n_smp, 1, "only X0 samples");
    rd(REG_X0, d); chk(d, 32'h5555_5555, "new X0");
    rd(REG_X3, d); chk(d, 32'h8888_8888, "new X3");
    chk(n_act, 1, "no extra actuation");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
