// vec_add: vector adder of the plant-on-chip emulator.
//
// Forms one element of the new state, Xnew[i] = uB[i] + AX[i], and adds the
// disturbance word when add_noise is set (the emulator sets it for the cart
// position only). The sum is saturated to the word range instead of
// wrapping. Purely combinational; the emulator registers the result in the
// Xnew RAM. Saturation and the noise input are this design's choices.
module vec_add
  import poc_pkg::*;
(
  input  word_t ub,
  input  word_t ax,
  input  word_t noise,
  input  logic  add_noise,
  output word_t y
);

  localparam int unsigned SW = DATA_W + 2;
  localparam logic signed [SW-1:0] MAXV = SW'({1'b0, {(DATA_W-1){1'b1}}});
  localparam logic signed [SW-1:0] MINV = -MAXV - 1;

  logic signed [SW-1:0] sum;

  always_comb begin
    sum = SW'(ub) + SW'(ax) + (add_noise ? SW'(noise) : SW'(0));
    if (sum > MAXV)      y = word_t'(MAXV);
    else if (sum < MINV) y = word_t'(MINV);
    else                 y = word_t'(sum);
  end

endmodule
