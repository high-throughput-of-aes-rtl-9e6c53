// aes_pkg: types and constants shared by the AES-128 encryption/decryption
// datapath.
//
// The 128-bit block is kept in the byte order of the AES standard: byte 0 is
// the most significant byte of the vector (bits 127:120), and the state is
// filled column by column, so byte 4*c+r sits in row r of column c. A test
// vector written as a hex string therefore maps directly onto a 128-bit
// literal.
//
// Each round is split into its transformations with a register after each
// one. step_e names the transformation that the state register loads on a
// given clock edge. The S-box tables are not typed in: sbox_table() builds
// them at elaboration from their definition, the multiplicative inverse in
// GF(2^8) (found through log/antilog tables with generator 0x03) followed by
// the affine map b ^ rotl(b,1) ^ rotl(b,2) ^ rotl(b,3) ^ rotl(b,4) ^ 0x63.
package aes_pkg;

  typedef logic [127:0] block_t;
  typedef logic [31:0]  word_t;
  typedef logic [7:0]   byte_t;

  localparam int unsigned NUM_ROUNDS   = 10;  // AES-128
  localparam int unsigned STEPS_ROUND  = 4;   // SubBytes, ShiftRows, MixColumn, AddRoundKey
  // one initial AddRoundKey, nine four-step rounds, a three-step last round
  localparam int unsigned BLOCK_CYCLES = 1 + (NUM_ROUNDS - 1) * STEPS_ROUND + 3;  // 40

  typedef logic [3:0] round_t;  // 0 .. 10

  typedef enum logic [2:0] {
    STEP_IDLE = 3'd0,   // state register holds
    STEP_LOAD = 3'd1,   // initial AddRoundKey with the input block
    STEP_SUB  = 3'd2,   // SubBytes / InvSubBytes
    STEP_SHIFT = 3'd3,  // ShiftRows / InvShiftRows
    STEP_MIX  = 3'd4,   // MixColumn / InvMixColumn
    STEP_ARK  = 3'd5    // AddRoundKey
  } step_e;

  // multiplication by x (0x02) in GF(2^8) modulo x^8 + x^4 + x^3 + x + 1
  function automatic byte_t xtime(byte_t a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  // general GF(2^8) product, shift-and-add
  function automatic byte_t gf_mul(byte_t a, byte_t b);
    byte_t p = '0;
    byte_t x = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p ^= x;
      x = xtime(x);
    end
    return p;
  endfunction

  function automatic byte_t rotl8(byte_t b, int unsigned n);
    return byte_t'((b << n) | (b >> (8 - n)));
  endfunction

  // Forward (inverse == 0) or inverse (inverse == 1) S-box, entry i at bits
  // [8*i +: 8].
  function automatic logic [2047:0] sbox_table(bit inverse);
    byte_t exp_t [256];
    byte_t log_t [256];
    byte_t fwd   [256];
    byte_t p;
    byte_t inv;
    logic [2047:0] t;
    p = 8'h01;
    for (int i = 0; i < 255; i++) begin
      exp_t[i] = p;
      log_t[p] = byte_t'(i);
      p = p ^ xtime(p);            // p * 0x03
    end
    for (int x = 0; x < 256; x++) begin
      if (x == 0) inv = 8'h00;
      else        inv = exp_t[(255 - int'(log_t[x])) % 255];
      fwd[x] = inv ^ rotl8(inv, 1) ^ rotl8(inv, 2) ^ rotl8(inv, 3) ^ rotl8(inv, 4) ^ 8'h63;
    end
    t = '0;
    for (int x = 0; x < 256; x++) begin
      if (inverse) t[8*int'(fwd[x]) +: 8] = byte_t'(x);
      else         t[8*x +: 8] = fwd[x];
    end
    return t;
  endfunction

  // round constant of key-expansion round r (1 .. 10): x^(r-1)
  function automatic byte_t rcon(round_t r);
    byte_t c = 8'h01;
    for (int i = 1; i < 10; i++) if (i < int'(r)) c = xtime(c);
    return c;
  endfunction

  // byte k (0 = most significant) of a block
  function automatic byte_t get_byte(block_t b, int unsigned k);
    return b[127 - 8*k -: 8];
  endfunction

endpackage
