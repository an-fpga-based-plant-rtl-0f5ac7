// tb_ref_pkg: reference arithmetic for the plant-on-chip testbenches.
//
// Written independently of the RTL datapath: wide integer arithmetic for the
// Q8.24 products and sums (floor of the exact value, then saturation to 32
// bits), a bit-serial model of the noise LFSR, and the plant update
// X' = A*X + B*u (+ noise on the cart position) built from them.
package tb_ref_pkg;

  typedef logic signed [31:0]  w_t;
  typedef logic signed [127:0] big_t;

  function automatic w_t sat32(input big_t v);
    if (v > big_t'(32'sh7fffffff))  return 32'sh7fffffff;
    if (v < -big_t'(33'sh080000000)) return 32'sh80000000;
    return w_t'(v);
  endfunction

  // floor(v / 2^24), without relying on arithmetic shift of the operand type
  function automatic big_t floor_q24(input big_t v);
    big_t q;
    q = v / big_t'(1 << 24);
    if (v < 0 && q * big_t'(1 << 24) != v) q = q - 1;
    return q;
  endfunction

  function automatic w_t qmul(input w_t a, input w_t b);
    return sat32(floor_q24(big_t'(a) * big_t'(b)));
  endfunction

  function automatic w_t qdot4(input w_t a [4], input w_t x [4]);
    big_t s;
    s = 0;
    for (int k = 0; k < 4; k++) s += big_t'(a[k]) * big_t'(x[k]);
    return sat32(floor_q24(s));
  endfunction

  function automatic w_t sadd(input w_t a, input w_t b, input w_t c);
    return sat32(big_t'(a) + big_t'(b) + big_t'(c));
  endfunction

  // One LFSR step, bit by bit: shift right, feed back x^32+x^22+x^2+x+1.
  function automatic logic [31:0] lfsr_next(input logic [31:0] s);
    logic [31:0] n;
    logic        fb;
    fb = s[0];
    for (int k = 0; k < 31; k++) n[k] = s[k+1];
    n[31] = fb;
    if (fb) begin
      n[21] = n[21] ^ 1'b1;
      n[1]  = n[1]  ^ 1'b1;
      n[0]  = n[0]  ^ 1'b1;
    end
    return n;
  endfunction

  // Plant update; noise is added to element 2 (cart position) when nz_en.
  function automatic void plant_step(input w_t a [16], input w_t b [4], input w_t u,
                                     input logic nz_en, input w_t nz, ref w_t x [4]);
    w_t xn [4];
    w_t row [4];
    for (int i = 0; i < 4; i++) begin
      for (int j = 0; j < 4; j++) row[j] = a[4*i+j];
      xn[i] = sadd(qmul(b[i], u), qdot4(row, x), (nz_en && i == 2) ? nz : 32'sd0);
    end
    x = xn;
  endfunction

endpackage
