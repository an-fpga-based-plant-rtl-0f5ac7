// tb_noise_lfsr: compares the disturbance source with a bit-serial model of
// the same polynomial over many steps and shift amounts, checks that it only
// moves on `step`, and that the sequence does not repeat within 100,000 steps.
module tb_noise_lfsr;
  import poc_pkg::*;
  import tb_ref_pkg::*;

  localparam logic [31:0] SEED = 32'hC0FF_EE11;

  logic clk = 0, rst_n = 0, step = 0;
  logic [4:0] shift = 0;
  word_t noise;
  int checks = 0, failures = 0;

  noise_lfsr #(.SEED(SEED)) dut (.clk, .rst_n, .step, .shift, .noise);

  always #5 clk = ~clk;

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] s;
    logic [31:0] first;
    logic signed [31:0] e;
    repeat (2) @(posedge clk);
    rst_n = 1;
    s = SEED;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      shift = 5'($urandom);
      #1;
      e = $signed(s) / (32'sd1 <<< shift);
      if ($signed(s) < 0 && (e * (32'sd1 <<< shift)) != $signed(s)) e = e - 1;
      if (shift == 5'd31) e = $signed(s) < 0 ? -1 : 0;
      checks++;
      if (noise !== e) begin failures++; $display("FAIL t=%0d got %h exp %h", t, noise, e); end
      step = (t % 3) != 0;
      if (step) s = lfsr_next(s);
    end
    @(negedge clk) step = 1; shift = 0;
    @(posedge clk); #1;
    first = noise;
    s = noise;
    for (int t = 0; t < 100000; t++) begin
      @(posedge clk); #1;
      if (noise == first || noise == 0) begin
        failures++; $display("FAIL repeat/zero after %0d steps", t); break;
      end
    end
    checks++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
