// aes_ref_pkg: a plain behavioural AES-128 model used by the testbenches as
// the independent reference. It is written differently from the RTL on
// purpose: the S-box inverse is found by exhaustive search, the state is
// handled as a 4x4 byte matrix, and MixColumns uses a generic GF(2^8)
// multiply by 2 and 3.
package aes_ref_pkg;

  typedef logic [7:0]   u8;
  typedef logic [127:0] blk_t;
  typedef blk_t         rkeys_t [11];
  typedef u8            mat_t [4][4];  // [row][col]

  function automatic u8 ref_mul(u8 a, u8 b);
    logic [15:0] p = 16'h0;
    for (int i = 0; i < 8; i++) if (b[i]) p ^= (16'(a) << i);
    for (int i = 15; i >= 8; i--) if (p[i]) p ^= (16'h11b << (i - 8));
    return p[7:0];
  endfunction

  function automatic u8 ref_sbox(u8 x);
    u8 inv = 8'h00;
    u8 s;
    if (x != 0)
      for (int y = 1; y < 256; y++) if (ref_mul(x, u8'(y)) == 8'h01) inv = u8'(y);
    s = 8'h63;
    for (int i = 0; i < 8; i++)
      s[i] = s[i] ^ inv[i] ^ inv[(i+4)%8] ^ inv[(i+5)%8] ^ inv[(i+6)%8] ^ inv[(i+7)%8];
    return s;
  endfunction

  function automatic mat_t to_mat(blk_t b);
    mat_t m;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++) m[r][c] = b[127 - 8*(4*c + r) -: 8];
    return m;
  endfunction

  function automatic blk_t from_mat(mat_t m);
    blk_t b;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++) b[127 - 8*(4*c + r) -: 8] = m[r][c];
    return b;
  endfunction

  function automatic rkeys_t ref_expand(blk_t key);
    rkeys_t rk;
    logic [31:0] w [44];
    u8 rc = 8'h01;
    logic [31:0] t;
    for (int i = 0; i < 4; i++) w[i] = key[127 - 32*i -: 32];
    for (int i = 4; i < 44; i++) begin
      t = w[i-1];
      if (i % 4 == 0) begin
        t = {ref_sbox(t[23:16]), ref_sbox(t[15:8]), ref_sbox(t[7:0]), ref_sbox(t[31:24])};
        t[31:24] ^= rc;
        rc = ref_mul(rc, 8'h02);
      end
      w[i] = w[i-4] ^ t;
    end
    for (int r = 0; r < 11; r++) rk[r] = {w[4*r], w[4*r+1], w[4*r+2], w[4*r+3]};
    return rk;
  endfunction

  function automatic blk_t ref_encrypt(blk_t key, blk_t pt);
    rkeys_t rk = ref_expand(key);
    mat_t m, n;
    m = to_mat(pt ^ rk[0]);
    for (int rnd = 1; rnd <= 10; rnd++) begin
      for (int r = 0; r < 4; r++)
        for (int c = 0; c < 4; c++) n[r][c] = ref_sbox(m[r][(c + r) % 4]);
      if (rnd != 10)
        for (int c = 0; c < 4; c++)
          for (int r = 0; r < 4; r++)
            m[r][c] = ref_mul(8'h02, n[r][c]) ^ ref_mul(8'h03, n[(r+1)%4][c])
                      ^ n[(r+2)%4][c] ^ n[(r+3)%4][c];
      else
        m = n;
      m = to_mat(from_mat(m) ^ rk[rnd]);
    end
    return from_mat(m);
  endfunction

  function automatic blk_t rand_blk();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

endpackage
