// add_round_key - AddRoundKey: bitwise XOR of the 128-bit state with the
// 128-bit round key selected by the key MUX. Combinational.
module add_round_key (
  input  aes_pkg::block_t din,
  input  aes_pkg::block_t round_key,
  output aes_pkg::block_t dout
);

  assign dout = din ^ round_key;

endmodule
