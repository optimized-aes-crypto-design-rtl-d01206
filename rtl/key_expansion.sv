// key_expansion - one step of the AES-128 key schedule.
//
// From round key r-1 (words w0..w3, w0 in bits [127:96]) it forms round key
// r: t = SubWord(RotWord(w3)) ^ {Rcon(r),0,0,0}, then w0' = w0 ^ t,
// w1' = w1 ^ w0', w2' = w2 ^ w1', w3' = w3 ^ w2'. SubWord uses four
// forward-only DSE S-boxes. Called once per clock by the core, so the round
// keys of encryption are produced on the fly, one per round; it also fills
// the key buffer for decryption. round must be 1..10. Combinational.
module key_expansion (
  input  aes_pkg::block_t prev_key,
  input  aes_pkg::round_t round,
  output aes_pkg::block_t next_key
);

  logic [31:0] w [4];
  logic [31:0] rot;
  logic [31:0] sub;
  logic [31:0] t;

  always_comb
    for (int i = 0; i < 4; i++) w[i] = prev_key[127 - 32*i -: 32];

  assign rot = {w[3][23:0], w[3][31:24]};

  for (genvar i = 0; i < 4; i++) begin : g_sbox
    dse_sbox #(.ENC_DEC(1'b0)) u_sbox (
      .x  (rot[8*i +: 8]),
      .inv(1'b0),
      .y  (sub[8*i +: 8])
    );
  end

  assign t = sub ^ {aes_pkg::rcon(round), 24'h000000};

  always_comb begin
    logic [31:0] acc;
    acc = t;
    for (int i = 0; i < 4; i++) begin
      acc = acc ^ w[i];
      next_key[127 - 32*i -: 32] = acc;
    end
  end

endmodule
