// aes_pkg: AES-128 arithmetic shared by the cipher cores and the key schedule.
//
// The 128-bit state uses the byte order of the AES standard: byte 0 is
// bits [127:120], and byte i sits in row i%4, column i/4. The S-box and its
// inverse are not typed in as tables; they are computed at elaboration time
// from their definition (multiplicative inverse in GF(2^8) modulo
// x^8+x^4+x^3+x+1, followed by the affine map with constant 0x63), so a
// synthesis tool turns each lookup into a 256-entry ROM.
//
// The published architecture only says that a folded AES with 128-bit data and key paths is
// used; AES-128 (ten rounds, one per cycle) is the variant that matches its
// "10 cycles per block" figure. Everything in this package is standard AES.
package aes_pkg;

  typedef logic [127:0]        block_t;
  typedef logic [10:0][127:0]  sched_t;   // round keys 0..10, index = round
  typedef logic [255:0][7:0]   sbox_t;

  typedef enum logic [0:0] {AES_ENC = 1'b0, AES_DEC = 1'b1} aes_dir_e;

  function automatic logic [7:0] xtime(input logic [7:0] a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  function automatic logic [7:0] gmul(input logic [7:0] a, input logic [7:0] b);
    logic [7:0] p, x;
    p = '0;
    x = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p ^= x;
      x = xtime(x);
    end
    return p;
  endfunction

  // S-box (inv = 0) or inverse S-box (inv = 1), computed from the definition.
  function automatic sbox_t gen_sbox(input bit inv);
    sbox_t      t;
    logic [7:0] y, p, s;
    for (int x = 0; x < 256; x++) begin
      // y = x^254, the GF(2^8) inverse (0 maps to 0)
      y = 8'h01;
      p = 8'(x);
      for (int e = 0; e < 8; e++) begin
        if (e != 0) y = gmul(y, p);
        p = gmul(p, p);
      end
      if (x == 0) y = 8'h00;
      for (int i = 0; i < 8; i++)
        s[i] = y[i] ^ y[(i+4)%8] ^ y[(i+5)%8] ^ y[(i+6)%8] ^ y[(i+7)%8];
      s ^= 8'h63;
      if (inv) t[s] = 8'(x);
      else     t[x] = s;
    end
    return t;
  endfunction

  localparam sbox_t SBOX     = gen_sbox(1'b0);
  localparam sbox_t INV_SBOX = gen_sbox(1'b1);

  function automatic logic [7:0] get_byte(input block_t s, input int i);
    return s[127-8*i -: 8];
  endfunction

  function automatic block_t sub_bytes(input block_t s);
    block_t r;
    for (int i = 0; i < 16; i++) r[127-8*i -: 8] = SBOX[get_byte(s, i)];
    return r;
  endfunction

  function automatic block_t inv_sub_bytes(input block_t s);
    block_t r;
    for (int i = 0; i < 16; i++) r[127-8*i -: 8] = INV_SBOX[get_byte(s, i)];
    return r;
  endfunction

  function automatic block_t shift_rows(input block_t s);
    block_t r;
    for (int c = 0; c < 4; c++)
      for (int w = 0; w < 4; w++)
        r[127-8*(4*c+w) -: 8] = get_byte(s, 4*((c+w)%4)+w);
    return r;
  endfunction

  function automatic block_t inv_shift_rows(input block_t s);
    block_t r;
    for (int c = 0; c < 4; c++)
      for (int w = 0; w < 4; w++)
        r[127-8*(4*((c+w)%4)+w) -: 8] = get_byte(s, 4*c+w);
    return r;
  endfunction

  function automatic block_t mix_columns(input block_t s);
    block_t r;
    logic [7:0] a0, a1, a2, a3;
    for (int c = 0; c < 4; c++) begin
      a0 = get_byte(s, 4*c);   a1 = get_byte(s, 4*c+1);
      a2 = get_byte(s, 4*c+2); a3 = get_byte(s, 4*c+3);
      r[127-8*(4*c)   -: 8] = xtime(a0) ^ (xtime(a1) ^ a1) ^ a2 ^ a3;
      r[127-8*(4*c+1) -: 8] = a0 ^ xtime(a1) ^ (xtime(a2) ^ a2) ^ a3;
      r[127-8*(4*c+2) -: 8] = a0 ^ a1 ^ xtime(a2) ^ (xtime(a3) ^ a3);
      r[127-8*(4*c+3) -: 8] = (xtime(a0) ^ a0) ^ a1 ^ a2 ^ xtime(a3);
    end
    return r;
  endfunction

  function automatic block_t inv_mix_columns(input block_t s);
    block_t r;
    logic [7:0] a0, a1, a2, a3;
    for (int c = 0; c < 4; c++) begin
      a0 = get_byte(s, 4*c);   a1 = get_byte(s, 4*c+1);
      a2 = get_byte(s, 4*c+2); a3 = get_byte(s, 4*c+3);
      r[127-8*(4*c)   -: 8] = gmul(a0, 8'h0e) ^ gmul(a1, 8'h0b) ^ gmul(a2, 8'h0d) ^ gmul(a3, 8'h09);
      r[127-8*(4*c+1) -: 8] = gmul(a0, 8'h09) ^ gmul(a1, 8'h0e) ^ gmul(a2, 8'h0b) ^ gmul(a3, 8'h0d);
      r[127-8*(4*c+2) -: 8] = gmul(a0, 8'h0d) ^ gmul(a1, 8'h09) ^ gmul(a2, 8'h0e) ^ gmul(a3, 8'h0b);
      r[127-8*(4*c+3) -: 8] = gmul(a0, 8'h0b) ^ gmul(a1, 8'h0d) ^ gmul(a2, 8'h09) ^ gmul(a3, 8'h0e);
    end
    return r;
  endfunction

  // One encryption round (last = no MixColumns), round key added at the end.
  function automatic block_t enc_round(input block_t s, input block_t rk, input logic last);
    block_t t;
    t = shift_rows(sub_bytes(s));
    if (!last) t = mix_columns(t);
    return t ^ rk;
  endfunction

  // One round of the inverse cipher (last = no InvMixColumns).
  function automatic block_t dec_round(input block_t s, input block_t rk, input logic last);
    block_t t;
    t = inv_sub_bytes(inv_shift_rows(s)) ^ rk;
    if (!last) t = inv_mix_columns(t);
    return t;
  endfunction

  function automatic logic [7:0] rcon(input int unsigned round);
    logic [7:0] r;
    r = 8'h01;
    for (int unsigned i = 1; i < round; i++) r = xtime(r);
    return r;
  endfunction

  // Round key 'round' (1..10) from round key 'round-1'.
  function automatic block_t next_round_key(input block_t k, input int unsigned round);
    logic [31:0] w0, w1, w2, w3, t;
    {w0, w1, w2, w3} = k;
    t = {SBOX[w3[23:16]], SBOX[w3[15:8]], SBOX[w3[7:0]], SBOX[w3[31:24]]};
    t[31:24] ^= rcon(round);
    w0 ^= t;
    w1 ^= w0;
    w2 ^= w1;
    w3 ^= w2;
    return {w0, w1, w2, w3};
  endfunction

endpackage
