// aes_model_pkg - reference AES-128 model used by the testbenches.
//
// Written independently of the RTL: the S-box is built from exponent and
// logarithm tables over the generator 0x03, the affine map is written as
// b ^ rotl(b,1) ^ rotl(b,2) ^ rotl(b,3) ^ rotl(b,4) ^ 0x63, the inverse
// S-box is found by search, and decryption uses the plain inverse cipher
// (not the equivalent inverse cipher of the hardware).
package aes_model_pkg;

  typedef logic [7:0]   u8;
  typedef logic [127:0] blk;

  function automatic u8 rotl8(u8 b, int n);
    return u8'((b << n) | (b >> (8 - n)));
  endfunction

  function automatic u8 mul(u8 a, u8 b);
    u8 p = 0;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p ^= a;
      a = a[7] ? u8'((a << 1) ^ 8'h1b) : u8'(a << 1);
    end
    return p;
  endfunction

  function automatic u8 sbox(u8 x);
    u8 e [256];
    u8 l [256];
    u8 v, b;
    v = 8'h01;
    for (int i = 0; i < 255; i++) begin
      e[i] = v;
      l[v] = u8'(i);
      v = mul(v, 8'h03);
    end
    b = (x == 0) ? 8'h00 : e[(255 - int'(l[x])) % 255];
    return b ^ rotl8(b, 1) ^ rotl8(b, 2) ^ rotl8(b, 3) ^ rotl8(b, 4) ^ 8'h63;
  endfunction

  function automatic u8 inv_sbox(u8 y);
    for (int i = 0; i < 256; i++)
      if (sbox(u8'(i)) == y) return u8'(i);
    return 8'h00;
  endfunction

  function automatic u8 get(blk s, int i);
    return s[127 - 8*i -: 8];
  endfunction

  function automatic blk sub_bytes(blk s, bit inv);
    blk o;
    for (int i = 0; i < 16; i++) o[127 - 8*i -: 8] = inv ? inv_sbox(get(s, i)) : sbox(get(s, i));
    return o;
  endfunction

  // Row r of column c moves to column c - r (forward).
  function automatic blk shift_rows(blk s, bit inv);
    blk o;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        if (!inv) o[127 - 8*(4*((c + 4 - r) % 4) + r) -: 8] = get(s, 4*c + r);
        else      o[127 - 8*(4*((c + r) % 4) + r) -: 8]     = get(s, 4*c + r);
    return o;
  endfunction

  function automatic blk mix_columns(blk s, bit inv);
    blk o;
    u8 m [4];
    for (int c = 0; c < 4; c++) begin
      m = inv ? '{8'h0e, 8'h0b, 8'h0d, 8'h09} : '{8'h02, 8'h03, 8'h01, 8'h01};
      for (int r = 0; r < 4; r++) begin
        u8 acc = 0;
        for (int k = 0; k < 4; k++) acc ^= mul(m[(k - r + 4) % 4], get(s, 4*c + k));
        o[127 - 8*(4*c + r) -: 8] = acc;
      end
    end
    return o;
  endfunction

  function automatic blk next_key(blk k, int rnd);
    logic [31:0] w [4];
    logic [31:0] t;
    u8 rc = 8'h01;
    for (int i = 1; i < rnd; i++) rc = mul(rc, 8'h02);
    for (int i = 0; i < 4; i++) w[i] = k[127 - 32*i -: 32];
    t = {sbox(w[3][23:16]) ^ rc, sbox(w[3][15:8]), sbox(w[3][7:0]), sbox(w[3][31:24])};
    w[0] ^= t; w[1] ^= w[0]; w[2] ^= w[1]; w[3] ^= w[2];
    return {w[0], w[1], w[2], w[3]};
  endfunction

  function automatic blk encrypt(blk key, blk pt);
    blk s = pt ^ key;
    blk k = key;
    for (int r = 1; r <= 10; r++) begin
      k = next_key(k, r);
      s = shift_rows(sub_bytes(s, 0), 0);
      if (r != 10) s = mix_columns(s, 0);
      s ^= k;
    end
    return s;
  endfunction

  function automatic blk decrypt(blk key, blk ct);
    blk rk [11];
    blk s;
    rk[0] = key;
    for (int r = 1; r <= 10; r++) rk[r] = next_key(rk[r-1], r);
    s = ct ^ rk[10];
    for (int r = 9; r >= 0; r--) begin
      s = sub_bytes(shift_rows(s, 1), 1);
      s ^= rk[r];
      if (r != 0) s = mix_columns(s, 1);
    end
    return s;
  endfunction

  function automatic blk rand_blk();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

endpackage
