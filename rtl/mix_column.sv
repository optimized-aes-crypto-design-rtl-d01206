// mix_column - MixColumns / InvMixColumns of one 32-bit state column.
//
// The column (a0 in bits [31:24] .. a3 in bits [7:0]) is multiplied in
// GF(2^8) by the circulant matrix {02,03,01,01} or, with inv = 1, by
// {0e,0b,0d,09}. The inverse is formed as the forward product of a
// pre-processed column: u = x^2*(a0^a2), v = x^2*(a1^a3), and the forward
// matrix is applied to (a0^u, a1^v, a2^u, a3^v), which shares the xtime
// logic between both directions. The matrices are those of the AES
// standard; the shared formulation is this design's own. Combinational.
module mix_column (
  input  logic [31:0] din,
  input  logic        inv,
  output logic [31:0] dout
);

  import aes_pkg::xtime;

  logic [7:0] a [4];
  logic [7:0] b [4];
  logic [7:0] u, v;

  always_comb begin
    for (int i = 0; i < 4; i++) a[i] = din[31 - 8*i -: 8];
    u = inv ? xtime(xtime(a[0] ^ a[2])) : 8'h00;
    v = inv ? xtime(xtime(a[1] ^ a[3])) : 8'h00;
    b[0] = a[0] ^ u;
    b[1] = a[1] ^ v;
    b[2] = a[2] ^ u;
    b[3] = a[3] ^ v;
    for (int i = 0; i < 4; i++)
      dout[31 - 8*i -: 8] = xtime(b[i]) ^ xtime(b[(i+1)%4]) ^ b[(i+1)%4]
                          ^ b[(i+2)%4] ^ b[(i+3)%4];
  end

endmodule
