// noise_lfsr: pseudo-random disturbance source of the plant-on-chip emulator.
//
// A 32-bit Galois linear-feedback shift register (polynomial
// x^32 + x^22 + x^2 + x + 1, maximal length) advances one step for each
// pulse of `step`. Its state, read as a signed number and shifted right
// arithmetically by `shift`, is the disturbance word: uniformly spread over
// about +/- 2^(31-shift) LSBs, so shift sets the amplitude. The emulator adds
// it to the cart position, as the plant disturbance experiments do. The
// generator type, polynomial and scaling are this design's choices.
module noise_lfsr
  import poc_pkg::*;
#(
  parameter logic [31:0] SEED = 32'h1D2C_3B4A
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       step,
  input  logic [4:0] shift,
  output word_t      noise
);

  localparam logic [31:0] TAPS = 32'h8020_0003;

  logic [31:0] state;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    state <= (SEED == '0) ? 32'h1 : SEED;
    else if (step) state <= state[0] ? ((state >> 1) ^ TAPS) : (state >> 1);
  end

  assign noise = word_t'($signed(state) >>> shift);

endmodule
