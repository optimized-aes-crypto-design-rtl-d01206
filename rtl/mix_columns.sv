// mix_columns - MixColumns / InvMixColumns on the 128-bit AES state.
//
// Four mix_column units act on the four 32-bit columns in parallel. With
// bypass = 1 the state passes unchanged: the final AES round has no
// MixColumns, and the bypass sits in this unit so that the round chain stays
// one fixed path. Combinational.
module mix_columns (
  input  aes_pkg::block_t din,
  input  logic            inv,
  input  logic            bypass,
  output aes_pkg::block_t dout
);

  aes_pkg::block_t mixed;

  for (genvar c = 0; c < 4; c++) begin : g_col
    mix_column u_col (
      .din (din[127 - 32*c -: 32]),
      .inv (inv),
      .dout(mixed[127 - 32*c -: 32])
    );
  end

  assign dout = bypass ? din : mixed;

endmodule
