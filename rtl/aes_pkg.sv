// aes_pkg: types, constants and byte/word functions shared by the AES-128
// encryption core.
//
// State convention (FIPS-197): a 128-bit block holds bytes 0..15 with byte 0
// in bits [127:120]. Byte i is state element (row i%4, column i/4), so every
// 32-bit word [127:96], [95:64], ... is one column.
//
// The S-box contents are computed here (multiplicative inverse in GF(2^8)
// modulo x^8+x^4+x^3+x+1, 0 mapping to 0, followed by the affine map with
// constant 0x63) so that the ROMs need no external table file. The round
// constants are computed by repeated doubling in GF(2^8).
package aes_pkg;

  // AES-128: 10 rounds, 11 round keys (round key 0 is the cipher key).
  localparam int unsigned NR         = 10;
  localparam int unsigned NUM_RKEYS  = NR + 1;
  localparam int unsigned BLOCK_W    = 128;
  localparam int unsigned KEY_ADDR_W = 4;

  typedef logic [7:0]            byte_t;
  typedef logic [31:0]           word_t;
  typedef logic [BLOCK_W-1:0]    block_t;
  typedef logic [KEY_ADDR_W-1:0] key_addr_t;

  // Operating mode chosen by the system control unit.
  typedef enum logic [0:0] {
    MODE_ENCRYPT    = 1'b0,  // S-box ROMs serve the processing core
    MODE_KEY_EXPAND = 1'b1   // S-box ROMs serve the key logic
  } mode_e;

  // 3-bit status bus from the input interface to the system control unit.
  typedef struct packed {
    logic key_rd;     // one-cycle pulse: a new cipher key was latched
    logic data_rd;    // one-cycle pulse: a new (key-whitened) block was latched
    logic key_valid;  // a cipher key has been latched since reset
  } if_status_t;

  // 2-bit readiness bus from the processing core to the system control unit.
  typedef struct packed {
    logic new_key;    // no block in flight: the key may be replaced
    logic new_data;   // a block latched now can enter the core next cycle
  } core_ready_t;

  function automatic byte_t xtime(byte_t b);
    return {b[6:0], 1'b0} ^ (b[7] ? 8'h1b : 8'h00);
  endfunction

  typedef byte_t sbox_table_t [256];

  function automatic byte_t affine(byte_t b);
    return b ^ {b[6:0], b[7]} ^ {b[5:0], b[7:6]} ^ {b[4:0], b[7:5]}
             ^ {b[3:0], b[7:4]} ^ 8'h63;
  endfunction

  // The whole S-box. 3 generates the multiplicative group of GF(2^8), so
  // walking p = 3^k (k = 0..254) gives every nonzero element once, and the
  // inverse of 3^k is 3^(255-k). The table is filled with one such walk.
  function automatic sbox_table_t sbox_table();
    sbox_table_t t;
    byte_t pw [255];
    byte_t p = 8'h01;
    for (int k = 0; k < 255; k++) begin
      pw[k] = p;
      p = p ^ xtime(p);  // p * 3
    end
    t[0] = affine(8'h00);
    for (int k = 0; k < 255; k++) t[pw[k]] = affine(pw[(255 - k) % 255]);
    return t;
  endfunction

  function automatic byte_t get_byte(block_t s, int unsigned i);
    return s[BLOCK_W-1-8*i -: 8];
  endfunction

  // ShiftRows: row r is rotated left by r columns.
  function automatic block_t shift_rows(block_t s);
    block_t o;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        o[BLOCK_W-1-8*(r+4*c) -: 8] = get_byte(s, r + 4*((c + r) % 4));
    return o;
  endfunction

  function automatic word_t mix_column(word_t w);
    byte_t a0 = w[31:24], a1 = w[23:16], a2 = w[15:8], a3 = w[7:0];
    byte_t t  = a0 ^ a1 ^ a2 ^ a3;
    return {a0 ^ t ^ xtime(a0 ^ a1),
            a1 ^ t ^ xtime(a1 ^ a2),
            a2 ^ t ^ xtime(a2 ^ a3),
            a3 ^ t ^ xtime(a3 ^ a0)};
  endfunction

  function automatic block_t mix_columns(block_t s);
    block_t o;
    for (int c = 0; c < 4; c++)
      o[BLOCK_W-1-32*c -: 32] = mix_column(s[BLOCK_W-1-32*c -: 32]);
    return o;
  endfunction

  function automatic word_t rot_word(word_t w);
    return {w[23:0], w[31:24]};
  endfunction

  // Round constant byte of round r (1..10): 01,02,04,...,80,1b,36.
  function automatic byte_t rcon(int unsigned r);
    byte_t c = 8'h01;
    for (int unsigned i = 1; i < r; i++) c = xtime(c);
    return c;
  endfunction

endpackage
