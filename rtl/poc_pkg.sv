// poc_pkg: types and constants shared by the plant-on-chip (PoC) emulator,
// its processor interface and the profiler.
//
// Numbers are signed two's-complement fixed point, Q8.24 in 32 bits (this
// format is a design choice; the plant model itself fixes no word size).
// The state vector is X = [theta, theta_dot, x, x_dot]: pendulum angle (rad)
// and angular rate, cart position (m) and velocity. The input u is the force
// on the cart (N).
//
// The default A and B contents are the linearised inverted pendulum on a cart
// (cart mass 0.5 kg, pendulum mass 0.2 kg, friction 0.1 N/m/s, inertia
// 0.006 kg m^2, pivot-to-centre length 0.3 m), discretised for a 1 ms update
// step with a second-order series:
//   Ad = I + Ac*dt + Ac^2*dt^2/2,   Bd = (I*dt + Ac*dt^2/2) * Bc
// where, with p = I(M+m) + M m l^2,
//   Ac = [0 1 0 0; mgl(M+m)/p 0 0 -mlb/p; 0 0 0 1; m^2 g l^2/p 0 0 -(I+ml^2)b/p]
//   Bc = [0; ml/p; 0; (I+ml^2)/p]
// and each entry is rounded to the nearest multiple of 2^-24.
package poc_pkg;

  localparam int unsigned DATA_W = 32;   // word width of X, u, A, B
  localparam int unsigned FRAC_W = 24;   // fractional bits
  localparam int unsigned N      = 4;    // number of state variables
  localparam int unsigned TS_W   = 32;   // profiler time-stamp width

  typedef logic signed [DATA_W-1:0] word_t;
  typedef word_t                    vec_t [N];

  // Row-major A (A[i][j] at index i*N+j).
  localparam word_t A_DEFAULT [N*N] = '{
    32'sh01000106, 32'sh00004189, 32'sh00000000, 32'shfffffffc,
    32'sh0007fb7e, 32'sh01000106, 32'sh00000000, 32'shffffe237,
    32'sh00000016, 32'sh00000000, 32'sh01000000, 32'sh00004188,
    32'sh0000af25, 32'sh00000016, 32'sh00000000, 32'sh00fff416
  };

  localparam word_t B_DEFAULT [N] = '{
    32'sh00000026, 32'sh000129dd, 32'sh0000000f, 32'sh00007725
  };

  // Index of the cart position x in X: where the disturbance is injected.
  localparam int unsigned IDX_X = 2;

  // Processor register map (word addresses).
  typedef enum logic [3:0] {
    REG_CTRL   = 4'd0,  // W/R: bit0 run, bit1 noise enable, bit2 single step (W only)
    REG_U      = 4'd1,  // W/R: Control Input reg
    REG_PERIOD = 4'd2,  // W/R: update period in clock cycles
    REG_STATUS = 4'd3,  // R  : bit0 busy, bits 31:8 low 24 bits of the update count
    REG_X0     = 4'd4,  // R  : sample X (latches all four words); W: initial theta
    REG_X1     = 4'd5,  // R  : theta_dot of the latched sample;    W: initial value
    REG_X2     = 4'd6,  // R  : x of the latched sample;            W: initial value
    REG_X3     = 4'd7,  // R  : x_dot of the latched sample;        W: initial value
    REG_NOISE  = 4'd8   // W/R: bits 4:0 right shift applied to the noise word
  } reg_addr_e;

  // Profiler record kinds, also the second byte of each serial frame.
  typedef enum logic [7:0] {
    EV_ACTUATE = 8'h01,   // processor wrote u
    EV_SAMPLE  = 8'h02    // processor sampled X
  } ev_kind_e;

  localparam logic [7:0] FRAME_SYNC = 8'hA5;

  typedef struct packed {
    ev_kind_e                  kind;
    logic [TS_W-1:0]           ts;
    logic [N-1:0][DATA_W-1:0]  data;   // u in data[0] for EV_ACTUATE
  } ev_rec_t;

endpackage
