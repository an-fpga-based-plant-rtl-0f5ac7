// mac: fixed-point multiply-accumulate unit of the plant-on-chip emulator.
//
// One signed DATA_W x DATA_W product per enabled clock is added to a wide
// accumulator; with clr set the accumulator starts from that product alone, so
// a dot product of length L takes L enabled cycles with clr on the first.
// The emulator uses it both to form u*B (one product per element) and the
// dot products of the rows of A with X, as the plant model requires.
//
// The accumulator keeps all product bits plus 4 guard bits, so no sum of up to
// 16 products overflows. The result is the accumulator shifted right by FRAC_W
// (rounding toward minus infinity) and saturated to DATA_W bits; it is valid
// the cycle after the last enabled cycle. Word width, fraction width, rounding
// and saturation are this design's choices.
module mac
  import poc_pkg::*;
#(
  parameter int unsigned W    = DATA_W,
  parameter int unsigned FRAC = FRAC_W
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,      // accumulate a*b this cycle
  input  logic                clr,     // with en: start a new sum
  input  logic signed [W-1:0] a,
  input  logic signed [W-1:0] b,
  output logic signed [W-1:0] result   // saturated (acc >>> FRAC)
);

  localparam int unsigned ACC_W = 2*W + 4;

  logic signed [ACC_W-1:0] acc;
  logic signed [2*W-1:0]   prod;
  logic signed [ACC_W-1:0] shifted;

  assign prod = a * b;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   acc <= '0;
    else if (en)  acc <= (clr ? ACC_W'(0) : acc) + ACC_W'(prod);
  end

  localparam logic signed [ACC_W-1:0] MAXV = ACC_W'({1'b0, {(W-1){1'b1}}});
  localparam logic signed [ACC_W-1:0] MINV = -MAXV - 1;

  always_comb begin
    shifted = acc >>> FRAC;
    if (shifted > MAXV)      result = W'(MAXV);
    else if (shifted < MINV) result = W'(MINV);
    else                     result = W'(shifted);
  end

endmodule
