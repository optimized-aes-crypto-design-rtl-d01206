// aes_pkg - types, constants and GF(2^8) helper functions shared by the
// AES-128 core and its DSE (decoder-switch-encoder) S-boxes.
//
// The byte order of a 128-bit block follows FIPS-197: byte 0 is bits
// [127:120], and byte 4*c+r is row r of column c. The S-box functions below
// are evaluated at elaboration time only, to wire the switch permutation of
// the DSE S-box; no table of S-box values is stored anywhere.
package aes_pkg;

  // Rounds for a 128-bit key. The 192/256-bit variants (12/14 rounds) are
  // not built.
  localparam int unsigned NR = 10;

  typedef logic [127:0] block_t;
  typedef logic [7:0]   byte_t;
  typedef logic [3:0]   round_t;

  // Datapath controls produced by the sequencer each cycle.
  typedef struct packed {
    logic   state_load;   // write AddRoundKey result into the state register
    logic   sel_input;    // data MUX: 1 = input buffer (round 0), 0 = round chain
    logic   last_round;   // final round: MixColumns bypassed
    logic   decrypt;      // inverse transformations, keys from the key buffer
    logic   key_init;     // load the on-the-fly key register from the initial key
    logic   key_step;     // advance the on-the-fly key register by one expansion
    logic   kbuf_we;      // write the key buffer
    round_t kbuf_waddr;   // key buffer write address
    logic   kbuf_from_in; // key buffer data: 1 = key input, 0 = expansion result
    logic   key_accept;   // capture key_in into the initial key register
    logic   in_consume;   // block taken from the input buffer
    logic   out_load;     // write AddRoundKey result into the output buffer
  } ctl_t;

  // Multiplication by x in GF(2^8) modulo x^8 + x^4 + x^3 + x + 1.
  function automatic byte_t xtime(byte_t b);
    return {b[6:0], 1'b0} ^ (b[7] ? 8'h1b : 8'h00);
  endfunction

  function automatic byte_t gf_mul(byte_t a, byte_t b);
    byte_t p = 8'h00;
    byte_t t = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p ^= t;
      t = xtime(t);
    end
    return p;
  endfunction

  // Multiplicative inverse as a^254 = a^2 * a^4 * ... * a^128 (0 maps to 0),
  // by repeated squaring.
  function automatic byte_t gf_inv(byte_t a);
    byte_t r = 8'h01;
    byte_t s = a;
    for (int i = 1; i < 8; i++) begin
      s = gf_mul(s, s);
      r = gf_mul(r, s);
    end
    return r;
  endfunction

  // Forward S-box: inverse followed by the affine map with constant 0x63.
  function automatic byte_t sbox_fwd(byte_t x);
    byte_t v = gf_inv(x);
    byte_t y;
    for (int i = 0; i < 8; i++)
      y[i] = v[i] ^ v[(i+4)%8] ^ v[(i+5)%8] ^ v[(i+6)%8] ^ v[(i+7)%8];
    return y ^ 8'h63;
  endfunction

  // Inverse S-box: inverse affine map (constant 0x05) followed by the inverse.
  function automatic byte_t sbox_inv(byte_t y);
    byte_t v;
    for (int i = 0; i < 8; i++)
      v[i] = y[(i+2)%8] ^ y[(i+5)%8] ^ y[(i+7)%8];
    return gf_inv(v ^ 8'h05);
  endfunction

  // Round constant of key expansion step r (1..10): x^(r-1).
  function automatic byte_t rcon(round_t r);
    byte_t c = 8'h01;
    for (int i = 1; i < 10; i++)
      if (i < int'(r)) c = xtime(c);
    return c;
  endfunction

endpackage
