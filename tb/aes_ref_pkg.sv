// aes_ref_pkg: plain reference model of AES-128 and its CBC modes, used only
// by the testbenches to work out expected values independently of the RTL.
//
// It keeps the state as a 4x4 byte matrix, builds its S-box by searching for
// each multiplicative inverse, and expands the key with the word recurrence
// of the standard. It is written for clarity, not speed.
package aes_ref_pkg;

  typedef logic [127:0] blk_t;
  typedef logic [7:0]   mat_t [4][4];   // [row][col]

  logic [7:0] sb  [256];
  logic [7:0] isb [256];
  bit         ready = 0;

  function automatic logic [7:0] mul(input logic [7:0] a, input logic [7:0] b);
    logic [7:0] r = 0;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) r ^= a;
      a = a[7] ? ((a << 1) ^ 8'h1b) : (a << 1);
    end
    return r;
  endfunction

  function automatic void setup();
    logic [7:0] inv, s;
    if (ready) return;
    for (int x = 0; x < 256; x++) begin
      inv = 0;
      for (int y = 1; y < 256; y++) if (mul(8'(x), 8'(y)) == 8'h01) inv = 8'(y);
      s = inv ^ {inv[6:0], inv[7]} ^ {inv[5:0], inv[7:6]} ^ {inv[4:0], inv[7:5]} ^ {inv[3:0], inv[7:4]} ^ 8'h63;
      sb[x]  = s;
      isb[s] = 8'(x);
    end
    ready = 1;
  endfunction

  function automatic void to_mat(input blk_t b, output mat_t m);
    for (int c = 0; c < 4; c++) for (int r = 0; r < 4; r++) m[r][c] = b[127 - 8*(4*c + r) -: 8];
  endfunction

  function automatic blk_t from_mat(input mat_t m);
    blk_t b;
    for (int c = 0; c < 4; c++) for (int r = 0; r < 4; r++) b[127 - 8*(4*c + r) -: 8] = m[r][c];
    return b;
  endfunction

  function automatic void expand(input blk_t key, output blk_t rk [11]);
    logic [31:0] w [44];
    logic [31:0] t;
    logic [7:0]  rc = 8'h01;
    setup();
    for (int i = 0; i < 4; i++) w[i] = key[127 - 32*i -: 32];
    for (int i = 4; i < 44; i++) begin
      t = w[i-1];
      if (i % 4 == 0) begin
        t = {sb[t[23:16]] ^ rc, sb[t[15:8]], sb[t[7:0]], sb[t[31:24]]};
        rc = mul(rc, 8'h02);
      end
      w[i] = w[i-4] ^ t;
    end
    for (int r = 0; r < 11; r++) rk[r] = {w[4*r], w[4*r+1], w[4*r+2], w[4*r+3]};
  endfunction

  function automatic blk_t encrypt(input blk_t key, input blk_t pt);
    blk_t rk [11];
    mat_t m, t;
    expand(key, rk);
    to_mat(pt ^ rk[0], m);
    for (int rnd = 1; rnd <= 10; rnd++) begin
      for (int r = 0; r < 4; r++) for (int c = 0; c < 4; c++) t[r][c] = sb[m[r][(c + r) % 4]];
      if (rnd != 10)
        for (int c = 0; c < 4; c++)
          for (int r = 0; r < 4; r++)
            m[r][c] = mul(t[r][c], 2) ^ mul(t[(r+1)%4][c], 3) ^ t[(r+2)%4][c] ^ t[(r+3)%4][c];
      else m = t;
      to_mat(from_mat(m) ^ rk[rnd], m);
    end
    return from_mat(m);
  endfunction

  function automatic blk_t decrypt(input blk_t key, input blk_t ct);
    blk_t rk [11];
    mat_t m, t;
    expand(key, rk);
    to_mat(ct ^ rk[10], m);
    for (int rnd = 9; rnd >= 0; rnd--) begin
      for (int r = 0; r < 4; r++) for (int c = 0; c < 4; c++) t[r][(c + r) % 4] = isb[m[r][c]];
      to_mat(from_mat(t) ^ rk[rnd], t);
      if (rnd != 0)
        for (int c = 0; c < 4; c++)
          for (int r = 0; r < 4; r++)
            m[r][c] = mul(t[r][c], 14) ^ mul(t[(r+1)%4][c], 11) ^ mul(t[(r+2)%4][c], 13) ^ mul(t[(r+3)%4][c], 9);
      else m = t;
    end
    return from_mat(m);
  endfunction

  // CBC over a list of blocks; returns the last chain value (the CBC-MAC)
  function automatic blk_t cbc_encrypt(input blk_t key, input blk_t iv, input blk_t p [$], ref blk_t c [$]);
    blk_t prev = iv;
    c.delete();
    foreach (p[i]) begin
      prev = encrypt(key, p[i] ^ prev);
      c.push_back(prev);
    end
    return prev;
  endfunction

endpackage
