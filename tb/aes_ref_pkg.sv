// aes_ref_pkg: a plain behavioural AES-128 model for the testbenches.
//
// It is written independently of the RTL: the S-box comes from the GF(2^8)
// inverse computed as x^254 followed by the affine map written bit by bit
// from its matrix definition, the cipher follows the textbook order
// (InvShiftRows, InvSubBytes, AddRoundKey, InvMixColumns for decryption) and
// the key schedule is the word-by-word expansion w[i] of the AES standard.
// Bytes are numbered from the most significant end of the 128-bit vector.
package aes_ref_pkg;

  typedef logic [127:0] blk_t;

  function automatic logic [7:0] m2(logic [7:0] a);
    return a[7] ? ((a << 1) ^ 8'h1b) : (a << 1);
  endfunction

  function automatic logic [7:0] mul(logic [7:0] a, logic [7:0] b);
    logic [7:0] r = 0;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) r ^= a;
      a = m2(a);
    end
    return r;
  endfunction

  localparam logic [7:0] AFFINE_C = 8'h63;

  // x^254, the multiplicative inverse in GF(2^8) (0 for 0)
  function automatic logic [7:0] gf_inv(logic [7:0] x);
    logic [7:0] r = 8'h01;
    logic [7:0] p = x;
    for (int i = 0; i < 8; i++) begin
      if (i != 0) r = mul(r, p);   // exponent 254 = 0b11111110
      p = mul(p, p);
    end
    return r;
  endfunction

  function automatic logic [7:0] sbox_calc(logic [7:0] x);
    logic [7:0] inv = gf_inv(x);
    logic [7:0] s;
    for (int i = 0; i < 8; i++)
      s[i] = inv[i] ^ inv[(i+4)%8] ^ inv[(i+5)%8] ^ inv[(i+6)%8] ^ inv[(i+7)%8] ^ AFFINE_C[i];
    return s;
  endfunction

  function automatic logic [4095:0] make_tables();
    logic [4095:0] t = '0;
    logic [7:0] v;
    for (int x = 0; x < 256; x++) begin
      v = sbox_calc(8'(x));
      t[8*x +: 8] = v;                 // forward table, low half
      t[2048 + 8*int'(v) +: 8] = 8'(x); // inverse table, high half
    end
    return t;
  endfunction

  localparam logic [4095:0] TABLES = make_tables();

  function automatic logic [7:0] sbox(logic [7:0] x);
    return TABLES[8*int'(x) +: 8];
  endfunction

  function automatic logic [7:0] inv_sbox(logic [7:0] y);
    return TABLES[2048 + 8*int'(y) +: 8];
  endfunction

  function automatic logic [7:0] gb(blk_t b, int k);
    return b[127-8*k -: 8];
  endfunction

  function automatic blk_t sub_bytes(blk_t b, bit inv);
    blk_t o;
    for (int k = 0; k < 16; k++) o[127-8*k -: 8] = inv ? inv_sbox(gb(b, k)) : sbox(gb(b, k));
    return o;
  endfunction

  function automatic blk_t shift_rows(blk_t b, bit inv);
    blk_t o;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        if (!inv) o[127-8*(4*c+r) -: 8] = gb(b, 4*((c+r)%4)+r);
        else      o[127-8*(4*((c+r)%4)+r) -: 8] = gb(b, 4*c+r);
    return o;
  endfunction

  function automatic blk_t mix_columns(blk_t b, bit inv);
    blk_t o;
    logic [7:0] a0, a1, a2, a3;
    for (int c = 0; c < 4; c++) begin
      a0 = gb(b, 4*c); a1 = gb(b, 4*c+1); a2 = gb(b, 4*c+2); a3 = gb(b, 4*c+3);
      if (!inv) begin
        o[127-8*(4*c)   -: 8] = mul(a0,2) ^ mul(a1,3) ^ a2 ^ a3;
        o[127-8*(4*c+1) -: 8] = a0 ^ mul(a1,2) ^ mul(a2,3) ^ a3;
        o[127-8*(4*c+2) -: 8] = a0 ^ a1 ^ mul(a2,2) ^ mul(a3,3);
        o[127-8*(4*c+3) -: 8] = mul(a0,3) ^ a1 ^ a2 ^ mul(a3,2);
      end else begin
        o[127-8*(4*c)   -: 8] = mul(a0,14) ^ mul(a1,11) ^ mul(a2,13) ^ mul(a3,9);
        o[127-8*(4*c+1) -: 8] = mul(a0,9) ^ mul(a1,14) ^ mul(a2,11) ^ mul(a3,13);
        o[127-8*(4*c+2) -: 8] = mul(a0,13) ^ mul(a1,9) ^ mul(a2,14) ^ mul(a3,11);
        o[127-8*(4*c+3) -: 8] = mul(a0,11) ^ mul(a1,13) ^ mul(a2,9) ^ mul(a3,14);
      end
    end
    return o;
  endfunction

  typedef blk_t keys_t [11];

  // all round keys of the AES-128 key schedule
  function automatic keys_t key_schedule(blk_t key);
    logic [31:0] w [44];
    logic [31:0] t;
    logic [7:0]  rc = 8'h01;
    keys_t k;
    for (int i = 0; i < 4; i++) w[i] = key[127-32*i -: 32];
    for (int i = 4; i < 44; i++) begin
      t = w[i-1];
      if (i % 4 == 0) begin
        t = {t[23:0], t[31:24]};
        for (int j = 0; j < 4; j++) t[8*j +: 8] = sbox(t[8*j +: 8]);
        t[31:24] ^= rc;
        rc = m2(rc);
      end
      w[i] = w[i-4] ^ t;
    end
    for (int r = 0; r < 11; r++) k[r] = {w[4*r], w[4*r+1], w[4*r+2], w[4*r+3]};
    return k;
  endfunction

  function automatic blk_t round_key(blk_t key, int r);
    keys_t k = key_schedule(key);
    return k[r];
  endfunction

  function automatic blk_t encrypt(blk_t pt, blk_t key);
    keys_t k = key_schedule(key);
    blk_t s = pt ^ k[0];
    for (int r = 1; r <= 10; r++) begin
      s = shift_rows(sub_bytes(s, 0), 0);
      if (r < 10) s = mix_columns(s, 0);
      s ^= k[r];
    end
    return s;
  endfunction

  function automatic blk_t decrypt(blk_t ct, blk_t key);
    keys_t k = key_schedule(key);
    blk_t s = ct ^ k[10];
    for (int r = 9; r >= 0; r--) begin
      s = sub_bytes(shift_rows(s, 1), 1);
      s ^= k[r];
      if (r > 0) s = mix_columns(s, 1);
    end
    return s;
  endfunction

  function automatic blk_t rand_blk();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

endpackage
