// icepole_pkg: shared types, constants and slice-level helper functions of
// the slice-serial ICEPOLE permutation core.
//
// State layout. The 1280-bit ICEPOLE state is a 4 x 5 x 64 cube of bits
// S[x][y][z]: 20 words of 64 bits, x = 0..3, y = 0..4, z = 0..63. A "slice" is
// the 20 bits with the same z. Inside a slice, bit widx(x,y) = 5*x + y holds
// word (x,y), so bits [5x+4 : 5x] form "row" x, the 5-bit element that the
// psi s-box and the mu matrix work on (bit y of a row is the coefficient of
// X^y when the row is read as an element of GF(2^5)).
//
// What follows the ICEPOLE definition: the round R = kappa o psi o pi o rho o mu,
// the mu matrix and field polynomial, the pi word permutation, the psi s-box,
// the LFSR feedback taps of the constant generator. What is this design's own
// reading: the bit order inside a slice, the rotation offsets r(x,y) and the
// constant generator's start value (taken from the published ICEPOLE cipher
// definition), and the command structure of the core.
package icepole_pkg;

  localparam int unsigned NX = 4;   // words per row direction (x)
  localparam int unsigned NY = 5;   // words per column direction (y)
  localparam int unsigned NW = 20;  // words in the state
  localparam int unsigned WL = 64;  // word length = number of slices

  typedef logic [NW-1:0] slice_t;
  typedef logic [4:0]    row_t;

  // Rotation offsets r(x,y) of the rho step: S'[x][y][z] = S[x][y][(z + r) mod 64].
  localparam int unsigned RHO_R [NX][NY] = '{
    '{ 0, 36,  3, 41, 18},
    '{ 1, 44, 10, 45,  2},
    '{62,  6, 43, 15, 61},
    '{28, 55, 25, 21, 56}
  };

  // Start value of the round-constant generator (constant of round 0).
  localparam logic [63:0] KAPPA_INIT = 64'h0091_A2B3_C4D5_E6F7;

  // Command of one core operation.
  typedef struct packed {
    logic        absorb;       // combine din into the state during the load pass
    logic [NW-1:0] replace;    // per word: 1 = overwrite with din, 0 = XOR din
    logic [3:0]  n_rounds;     // rounds to run after the load pass (0 = none)
    logic [3:0]  first_round;  // index of the first round constant
  } cmd_t;

  // Operation of the state register in one cycle.
  typedef enum logic [1:0] {
    ST_HOLD  = 2'd0,
    ST_SLICE = 2'd1,   // all words shift, new slice enters
    ST_RHO   = 2'd2    // enabled words rotate
  } state_op_e;

  // Phases of the controller.
  typedef enum logic [2:0] {
    PH_IDLE  = 3'd0,
    PH_LOAD  = 3'd1,   // data pass: squeeze, absorb, first mu
    PH_RHO   = 3'd2,   // per-word rotation
    PH_SLICE = 3'd3,   // pi, psi, kappa (and mu of the next round)
    PH_DONE  = 3'd4
  } phase_e;

  function automatic int unsigned widx(int unsigned x, int unsigned y);
    return 5 * x + y;
  endfunction

  // Word index after pi for word (x,y).
  function automatic int unsigned pi_dest(int unsigned x, int unsigned y);
    int unsigned xn, yn;
    xn = (x + y) % 4;
    yn = (xn + y + 1) % 5;
    return widx(xn, yn);
  endfunction

  // Left rotations of a word register that realise the rho offset of word j
  // when slice z is kept at register bit z and the register shifts towards
  // its MSB: k left rotations give S'[z] = S[z - k], so k = (64 - r) mod 64.
  function automatic int unsigned rho_shifts(int unsigned j);
    return (WL - RHO_R[j / 5][j % 5]) % WL;
  endfunction

  // pi: S[x'][y'] <- S[x][y] for every word, applied to one slice.
  function automatic slice_t pi_slice(slice_t s);
    slice_t o;
    o = '0;
    for (int unsigned x = 0; x < NX; x++)
      for (int unsigned y = 0; y < NY; y++)
        o[pi_dest(x, y)] = s[widx(x, y)];
    return o;
  endfunction

  // Multiplication by X in GF(2^5) modulo X^5 + X^2 + 1.
  function automatic row_t gf_x2(row_t a);
    return {a[3:0], 1'b0} ^ (a[4] ? 5'b00101 : 5'b00000);
  endfunction

  // Multiplication by 18 = X^4 + X.
  function automatic row_t gf_x18(row_t a);
    row_t a2, a4, a8, a16;
    a2  = gf_x2(a);
    a4  = gf_x2(a2);
    a8  = gf_x2(a4);
    a16 = gf_x2(a8);
    return a16 ^ a2;
  endfunction

endpackage
