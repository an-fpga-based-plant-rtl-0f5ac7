// tb_vec_ram: random writes and reads of the state-vector RAM against a
// shadow array, with the read result taken one clock after the address, and
// a read of the address being written (which must return the old word).
module tb_vec_ram;
  import poc_pkg::*;

  logic clk = 0, we = 0;
  logic [1:0] waddr = 0, raddr = 0;
  word_t wdata = 0, rdata;
  word_t shadow [4];
  int checks = 0, failures = 0;

  vec_ram dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_t exp;
    for (int k = 0; k < 4; k++) begin
      @(negedge clk) we = 1; waddr = 2'(k); wdata = word_t'($urandom);
      shadow[k] = wdata;
    end
    for (int t = 0; t < 1000; t++) begin
      @(negedge clk);
      we = $urandom % 2; waddr = 2'($urandom); wdata = word_t'($urandom);
      raddr = 2'($urandom);
      exp = shadow[raddr];
      @(posedge clk);
      if (we) shadow[waddr] = wdata;
      #1;
      checks++;
      if (rdata !== exp) begin failures++; $display("FAIL t=%0d got %h exp %h", t, rdata, exp); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
