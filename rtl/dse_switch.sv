// dse_switch - the "switch" of the DSE S-box: a pure wire permutation.
//
// Decoder line x is wired to encoder input S(x), so the one-hot code of the
// input byte becomes the one-hot code of its substitute. With INVERSE = 1 the
// wiring is that of the inverse S-box. There is no logic: the permutation is
// computed at elaboration from the S-box definition (GF(2^8) inverse and the
// affine map, see aes_pkg) and each output is a wire. That the switch is only
// wiring follows the published design; computing it rather than listing it,
// and the INVERSE parameter, are this design's own.
module dse_switch #(
  parameter bit INVERSE = 1'b0
) (
  input  logic [255:0] line,
  output logic [255:0] enc_in
);

  // Encoder input v is driven by the decoder line of the preimage of v.
  for (genvar v = 0; v < 256; v++) begin : g_wire
    localparam int unsigned SRC = INVERSE ? int'(aes_pkg::sbox_fwd(8'(v)))
                                          : int'(aes_pkg::sbox_inv(8'(v)));
    assign enc_in[v] = line[SRC];
  end

endmodule
