// dse_sbox - the full-balanced Decoder-Switch-Encoder AES S-box.
//
// The input byte is decoded into 256 one-hot lines (dse_decoder, three
// balanced stages), permuted by wiring (dse_switch) and encoded back into a
// byte (dse_encoder, four balanced stages). This decoder / switch / encoder
// chain is the published design. With ENC_DEC = 1 the unit also provides the
// inverse S-box: both switch permutations are wired and a row of 256 2:1
// selects, controlled by inv, chooses between them before the shared encoder;
// this way of serving SubBytes and InvSubBytes with one S-box is this
// design's own. With ENC_DEC = 0 (key expansion) only the forward wiring is
// built and inv is not used. Combinational, no clock.
module dse_sbox #(
  parameter bit ENC_DEC = 1'b1
) (
  input  logic [7:0] x,
  input  logic       inv,
  output logic [7:0] y
);

  logic [255:0] line;
  logic [255:0] fwd_in;
  logic [255:0] enc_in;

  dse_decoder u_dec (.x(x), .line(line));

  dse_switch #(.INVERSE(1'b0)) u_sw_fwd (.line(line), .enc_in(fwd_in));

  if (ENC_DEC) begin : g_encdec
    logic [255:0] inv_in;
    dse_switch #(.INVERSE(1'b1)) u_sw_inv (.line(line), .enc_in(inv_in));
    assign enc_in = inv ? inv_in : fwd_in;
  end else begin : g_fwd
    assign enc_in = fwd_in;
  end

  dse_encoder u_enc (.enc_in(enc_in), .y(y));

endmodule
