// gps_pkg: types, constants and PRESENT-80 primitives shared by the cryptoGPS cores.
//
// cryptoGPS tag response y = r + s*c is computed here with
//   sigma = |s| = 160 bits (secret), rho = |r| = 1088 bits (PRG output),
//   r regenerated by PRESENT-80 in output-feedback mode: 17 blocks x 64 bits,
//   c a low-Hamming-weight challenge transmitted as five bytes n4..n0.
// The PRESENT-80 S-box, bit permutation and key schedule follow the public
// PRESENT specification. The control words ps_ctrl_t (5 bits) and s_ctrl_t
// (10 bits) have the widths printed on the controller buses of the block
// diagram; how the bits are split into fields is this design's own choice.
package gps_pkg;

  localparam int unsigned SIGMA      = 160;           // bits of the secret s
  localparam int unsigned RHO        = 1088;          // bits of r and of the response y
  localparam int unsigned BLK_BITS   = 64;            // PRESENT block size
  localparam int unsigned N_BLOCKS   = RHO / BLK_BITS; // 17 PRESENT blocks per run
  localparam int unsigned N_ROUNDS   = 31;            // PRESENT rounds
  localparam int unsigned S_BYTES    = SIGMA / 8;     // 20 chunks of s
  localparam int unsigned C_BYTES    = 5;             // compact challenge n4..n0
  localparam int unsigned Y_BYTES    = RHO / 8;       // 136 response bytes
  localparam int unsigned POS_W      = 11;            // width of a challenge bit position

  // Operation of a PRESENT core for one clock cycle.
  typedef enum logic [3:0] {
    PS_NOP       = 4'd0,
    PS_LOAD_IV   = 4'd1,  // shift one IV chunk into the state
    PS_KEY_INIT  = 4'd2,  // reload the PRG key, round counter := 1
    PS_ROUND     = 4'd3,  // round-based: one full round
    PS_FINAL     = 4'd4,  // round-based: final key whitening + key reload
    PS_SBOX      = 4'd5,  // serialized: key add + S-box on one nibble
    PS_PLAYER_KS = 4'd6,  // serialized: bit permutation + key schedule
    PS_ROTATE    = 4'd7   // shift one output chunk out (rotating)
  } ps_op_e;

  typedef struct packed {
    ps_op_e op;       // 4 bits
    logic   add_key;  // serialized core: XOR the last round key into the rotated nibble
  } ps_ctrl_t;        // 5 bits (control_ps)

  typedef struct packed {
    logic       step;    // advance: load the overflow register (gReg)
    logic       n_zero;  // 1: pass the selected chunk of s, 0: force it to zero
    logic [2:0] c2;      // bit offset of the current copy of s
    logic [4:0] sel;     // chunk of s (0 = s[7:0] .. 19 = s[159:152])
  } s_ctrl_t;            // 10 bits (control_s)

  localparam logic [63:0] SBOX_TABLE = 64'h2174_8FE3_DA09_B65C; // nibble x holds S(x)

  function automatic logic [3:0] sbox(input logic [3:0] x);
    return SBOX_TABLE[4*x +: 4];
  endfunction

  function automatic logic [63:0] sbox_layer(input logic [63:0] x);
    logic [63:0] y;
    for (int i = 0; i < 16; i++) y[4*i +: 4] = sbox(x[4*i +: 4]);
    return y;
  endfunction

  // Bit i moves to position 16*i mod 63; bit 63 stays.
  function automatic logic [63:0] player(input logic [63:0] x);
    logic [63:0] y;
    for (int i = 0; i < 64; i++) y[(i == 63) ? 63 : ((16 * i) % 63)] = x[i];
    return y;
  endfunction

  // 80-bit key schedule step after round 'rc'.
  function automatic logic [79:0] key_update(input logic [79:0] k, input logic [4:0] rc);
    logic [79:0] t;
    t = {k[18:0], k[79:19]};             // rotate left by 61
    t[79:76] = sbox(t[79:76]);
    t[19:15] = t[19:15] ^ rc;
    return t;
  endfunction

endpackage
