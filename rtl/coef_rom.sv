// coef_rom: constant coefficient store of the plant-on-chip emulator.
//
// Two instances hold the plant's feedback matrix A (row-major, N*N words) and
// input matrix B (N words); the plant model treats both as constants. The
// contents come from the INIT parameter, whose default is the discretised
// inverted-pendulum A matrix defined in poc_pkg.
//
// Read is synchronous: the word at addr appears on data one clock later, which
// maps onto FPGA block memory. Synchronous read is this design's choice.
module coef_rom
  import poc_pkg::*;
#(
  parameter int unsigned DEPTH = N*N,
  parameter word_t       INIT [DEPTH] = A_DEFAULT,
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  output word_t         data
);

  word_t rom [DEPTH];

  always_comb begin
    for (int k = 0; k < DEPTH; k++) rom[k] = INIT[k];
  end

  always_ff @(posedge clk) begin
    data <= (int'(addr) < DEPTH) ? rom[addr] : '0;
  end

endmodule
