// des_pkg: constants, permutation functions and chip-level types shared by the
// DES pipeline, the DES chip and the three-chip module.
//
// Bit numbering follows the DES standard: bit 1 of an N-bit DES quantity is the
// most significant bit of the SystemVerilog vector, i.e. DES bit i lives at
// vector index N-i. Every permutation table below lists, for output bit j, the
// input bit it is taken from; the tables (IP, IP^-1, E, P, PC2, the eight
// S-boxes and the key rotation schedule) are those of the DES standard. The
// chip-level structs gather the per-chip control pins and the serial scan
// chains, whose set follows the chip block diagram.
package des_pkg;

  localparam int unsigned BLOCK_W  = 64;  // data block
  localparam int unsigned HALF_W   = 32;  // L or R
  localparam int unsigned EXP_W    = 48;  // E(R), subkey
  localparam int unsigned KHALF_W  = 28;  // C or D key half
  localparam int unsigned N_ROUNDS = 16;
  localparam int unsigned N_CELLS  = 8;   // cells (S-boxes) per stage

  typedef logic [BLOCK_W-1:0] block_t;
  typedef logic [HALF_W-1:0]  half_t;
  typedef logic [EXP_W-1:0]   exp_t;
  typedef logic [KHALF_W-1:0] khalf_t;

  // opmode pin encoding
  typedef enum logic {OP_ENCRYPT = 1'b0, OP_DECRYPT = 1'b1} opmode_e;

  typedef int unsigned tbl64_t [64];
  typedef int unsigned tbl48_t [48];
  typedef int unsigned tbl32_t [32];

  localparam tbl64_t IP_T = '{
    58,50,42,34,26,18,10, 2, 60,52,44,36,28,20,12, 4,
    62,54,46,38,30,22,14, 6, 64,56,48,40,32,24,16, 8,
    57,49,41,33,25,17, 9, 1, 59,51,43,35,27,19,11, 3,
    61,53,45,37,29,21,13, 5, 63,55,47,39,31,23,15, 7};

  localparam tbl64_t IPINV_T = '{
    40, 8,48,16,56,24,64,32, 39, 7,47,15,55,23,63,31,
    38, 6,46,14,54,22,62,30, 37, 5,45,13,53,21,61,29,
    36, 4,44,12,52,20,60,28, 35, 3,43,11,51,19,59,27,
    34, 2,42,10,50,18,58,26, 33, 1,41, 9,49,17,57,25};

  localparam tbl48_t E_T = '{
    32, 1, 2, 3, 4, 5,  4, 5, 6, 7, 8, 9,  8, 9,10,11,12,13,
    12,13,14,15,16,17, 16,17,18,19,20,21, 20,21,22,23,24,25,
    24,25,26,27,28,29, 28,29,30,31,32, 1};

  localparam tbl32_t P_T = '{
    16, 7,20,21,29,12,28,17,  1,15,23,26, 5,18,31,10,
     2, 8,24,14,32,27, 3, 9, 19,13,30, 6,22,11, 4,25};

  // PC2 over the 56-bit C||D key: entries 1..28 are C bits, 29..56 are D bits.
  localparam tbl48_t PC2_T = '{
    14,17,11,24, 1, 5,  3,28,15, 6,21,10, 23,19,12, 4,26, 8,
    16, 7,27,20,13, 2, 41,52,31,37,47,55, 30,40,51,45,33,48,
    44,49,39,56,34,53, 46,42,50,36,29,32};

  // Left rotations of C and D before each encryption round.
  typedef int unsigned shifts_t [N_ROUNDS];
  localparam shifts_t SHIFTS = '{1,1,2,2,2,2,2,2,1,2,2,2,2,2,2,1};

  // S-box tables, SBOX[box][row][col], box 0 = S1.
  typedef logic [3:0] sbox_tbl_t [N_CELLS][4][16];
  localparam sbox_tbl_t SBOX = '{
    '{'{14, 4,13, 1, 2,15,11, 8, 3,10, 6,12, 5, 9, 0, 7},
      '{ 0,15, 7, 4,14, 2,13, 1,10, 6,12,11, 9, 5, 3, 8},
      '{ 4, 1,14, 8,13, 6, 2,11,15,12, 9, 7, 3,10, 5, 0},
      '{15,12, 8, 2, 4, 9, 1, 7, 5,11, 3,14,10, 0, 6,13}},
    '{'{15, 1, 8,14, 6,11, 3, 4, 9, 7, 2,13,12, 0, 5,10},
      '{ 3,13, 4, 7,15, 2, 8,14,12, 0, 1,10, 6, 9,11, 5},
      '{ 0,14, 7,11,10, 4,13, 1, 5, 8,12, 6, 9, 3, 2,15},
      '{13, 8,10, 1, 3,15, 4, 2,11, 6, 7,12, 0, 5,14, 9}},
    '{'{10, 0, 9,14, 6, 3,15, 5, 1,13,12, 7,11, 4, 2, 8},
      '{13, 7, 0, 9, 3, 4, 6,10, 2, 8, 5,14,12,11,15, 1},
      '{13, 6, 4, 9, 8,15, 3, 0,11, 1, 2,12, 5,10,14, 7},
      '{ 1,10,13, 0, 6, 9, 8, 7, 4,15,14, 3,11, 5, 2,12}},
    '{'{ 7,13,14, 3, 0, 6, 9,10, 1, 2, 8, 5,11,12, 4,15},
      '{13, 8,11, 5, 6,15, 0, 3, 4, 7, 2,12, 1,10,14, 9},
      '{10, 6, 9, 0,12,11, 7,13,15, 1, 3,14, 5, 2, 8, 4},
      '{ 3,15, 0, 6,10, 1,13, 8, 9, 4, 5,11,12, 7, 2,14}},
    '{'{ 2,12, 4, 1, 7,10,11, 6, 8, 5, 3,15,13, 0,14, 9},
      '{14,11, 2,12, 4, 7,13, 1, 5, 0,15,10, 3, 9, 8, 6},
      '{ 4, 2, 1,11,10,13, 7, 8,15, 9,12, 5, 6, 3, 0,14},
      '{11, 8,12, 7, 1,14, 2,13, 6,15, 0, 9,10, 4, 5, 3}},
    '{'{12, 1,10,15, 9, 2, 6, 8, 0,13, 3, 4,14, 7, 5,11},
      '{10,15, 4, 2, 7,12, 9, 5, 6, 1,13,14, 0,11, 3, 8},
      '{ 9,14,15, 5, 2, 8,12, 3, 7, 0, 4,10, 1,13,11, 6},
      '{ 4, 3, 2,12, 9, 5,15,10,11,14, 1, 7, 6, 0, 8,13}},
    '{'{ 4,11, 2,14,15, 0, 8,13, 3,12, 9, 7, 5,10, 6, 1},
      '{13, 0,11, 7, 4, 9, 1,10,14, 3, 5,12, 2,15, 8, 6},
      '{ 1, 4,11,13,12, 3, 7,14,10,15, 6, 8, 0, 5, 9, 2},
      '{ 6,11,13, 8, 1, 4,10, 7, 9, 5, 0,15,14, 2, 3,12}},
    '{'{13, 2, 8, 4, 6,15,11, 1,10, 9, 3,14, 5, 0,12, 7},
      '{ 1,15,13, 8,10, 3, 7, 4,12, 5, 6,11, 0,14, 9, 2},
      '{ 7,11, 4, 1, 9,12,14, 2, 0, 6,10,13,15, 3, 5, 8},
      '{ 2, 1,14, 7, 4,10, 8,13,15,12, 9, 0, 3, 5, 6,11}}};

  function automatic block_t ip(block_t x);
    for (int j = 1; j <= 64; j++) ip[64-j] = x[64-IP_T[j-1]];
  endfunction

  function automatic block_t ip_inv(block_t x);
    for (int j = 1; j <= 64; j++) ip_inv[64-j] = x[64-IPINV_T[j-1]];
  endfunction

  function automatic exp_t e_exp(half_t x);
    for (int j = 1; j <= 48; j++) e_exp[48-j] = x[32-E_T[j-1]];
  endfunction

  function automatic half_t p_perm(half_t x);
    for (int j = 1; j <= 32; j++) p_perm[32-j] = x[32-P_T[j-1]];
  endfunction

  function automatic exp_t pc2(khalf_t c, khalf_t d);
    logic [55:0] cd;
    cd = {c, d};
    for (int j = 1; j <= 48; j++) pc2[48-j] = cd[56-PC2_T[j-1]];
  endfunction

  // Position (1..28) on a stage's key-half bus of subkey bit b (1..6) of cell
  // `cell` (1..8). Cells 1-4 read the C bus, cells 5-8 the D bus.
  function automatic int unsigned key_tap(int unsigned cell_no, int unsigned b);
    int unsigned t;
    t = PC2_T[6*(cell_no-1) + b - 1];
    return (cell_no <= 4) ? t : t - 28;
  endfunction

  function automatic khalf_t rotl(khalf_t x, int unsigned n);
    return khalf_t'((x << n) | (x >> (KHALF_W - n)));
  endfunction

  function automatic khalf_t rotr(khalf_t x, int unsigned n);
    return khalf_t'((x >> n) | (x << (KHALF_W - n)));
  endfunction

  // Key-half rotation applied on the way into stage `stage` (1..16).
  // Encryption rotates left by the round's shift; decryption rotates right
  // by the shift of the encryption round it undoes, and not at all into
  // stage 1 (the decryption of round 16 uses C16 = C0).
  function automatic int unsigned enc_shift(int unsigned stage);
    return SHIFTS[stage-1];
  endfunction

  function automatic int unsigned dec_shift(int unsigned stage);
    return (stage == 1) ? 0 : SHIFTS[17-stage];
  endfunction

  // ---- chip-level bundles -------------------------------------------------
  // One bit per serial scan chain of a DES chip.
  typedef struct packed {
    logic datapipe;   // pipeline data and opmode registers
    logic key1;       // pipeline key-half C registers
    logic key2;       // pipeline key-half D registers
    logic data_prng;  // data PRNG polynomial and seed
    logic key_prng1;  // key PRNG for C: polynomial and seed
    logic key_prng2;  // key PRNG for D: polynomial and seed
    logic sar;        // signature analyzer polynomial and state
  } chip_scan_t;

  // Control pins of one DES chip.
  typedef struct packed {
    logic       opmode;    // 1 = decrypt the block entering this cycle
    logic       pads;      // 1 = data from the input bumps, 0 = data PRNG
    logic [1:0] select;    // 16-bit output group hashed by the SAR
    logic       scanmode;  // 1 = every register shifts along its chain
    chip_scan_t scan_in;
  } chip_ctl_t;

endpackage
