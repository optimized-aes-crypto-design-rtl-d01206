// sub_bytes - SubBytes / InvSubBytes on a 128-bit AES state.
//
// Sixteen dse_sbox instances (decoder-switch-encoder S-boxes with both
// forward and inverse wiring) work in parallel, one per byte. inv selects
// InvSubBytes. Combinational; the byte order follows FIPS-197 (byte 0 is
// bits [127:120]), which does not matter here since every byte is
// substituted alike.
module sub_bytes (
  input  aes_pkg::block_t din,
  input  logic            inv,
  output aes_pkg::block_t dout
);

  for (genvar i = 0; i < 16; i++) begin : g_sbox
    dse_sbox #(.ENC_DEC(1'b1)) u_sbox (
      .x  (din[8*i +: 8]),
      .inv(inv),
      .y  (dout[8*i +: 8])
    );
  end

endmodule
