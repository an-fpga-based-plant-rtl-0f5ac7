// vec_ram: small state-vector RAM of the plant-on-chip emulator.
//
// Four instances hold the old state X, the products u*B, the products A*X and
// the new state Xnew. Each has one write port and one read port (simple dual
// port); the read is synchronous, so rdata shows the word at raddr one clock
// later. A read of the address written in the same cycle returns the old
// word. The contents are not reset: the emulator clears the old-state RAM
// after reset and writes each of the others before it reads it. The port
// structure and read timing are this design's choices.
module vec_ram
  import poc_pkg::*;
#(
  parameter int unsigned DEPTH = N,
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  word_t         wdata,
  input  logic [AW-1:0] raddr,
  output word_t         rdata
);

  word_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end

endmodule
