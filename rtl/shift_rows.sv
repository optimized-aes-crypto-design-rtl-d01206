// shift_rows - ShiftRows / InvShiftRows on a 128-bit AES state.
//
// Row r of the 4x4 byte state is rotated left by r positions (ShiftRows) or
// right by r positions (inv = 1, InvShiftRows). The state holds byte
// 4*c + r (row r, column c) at bits [127-8*(4*c+r) -: 8], as in FIPS-197.
// Pure wiring plus a 2:1 select per byte; combinational.
module shift_rows (
  input  aes_pkg::block_t din,
  input  logic            inv,
  output aes_pkg::block_t dout
);

  for (genvar c = 0; c < 4; c++) begin : g_col
    for (genvar r = 0; r < 4; r++) begin : g_row
      localparam int DST  = 4 * c + r;
      localparam int FWD  = 4 * ((c + r) % 4) + r;
      localparam int BWD  = 4 * ((c + 4 - r) % 4) + r;
      assign dout[127 - 8*DST -: 8] = inv ? din[127 - 8*BWD -: 8]
                                          : din[127 - 8*FWD -: 8];
    end
  end

endmodule
