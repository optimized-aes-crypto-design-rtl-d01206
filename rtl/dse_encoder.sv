// dse_encoder - balanced four-stage 256-to-8 encoder of the DSE S-box.
//
// Output bits are produced in pairs. For bit pair j (bits 2j+1:2j of the
// index) let C[j][c] be the OR of the 64 inputs whose pair j equals c. Then
//   O[2j] = C[j][1] | C[j][3],   O[2j+1] = C[j][2] | C[j][3]
// (the class c = 0 is not needed, and input 0x00 is in no class). Every C is
// an OR of 64 inputs, built as a tree of equal depth:
//   stage 1: OR4 of four inputs (111 gates), shared between output pairs:
//            - inputs 4m..4m+3 (m = 1..63) differ only in pair 0 and serve
//              C[1], C[2] and C[3];
//            - inputs q, q+0x40, q+0x80, q+0xc0 (q[1:0] != 0) differ only in
//              pair 3 and serve C[0].
//   stage 2: OR4 of four stage-1 gates (48 gates, 4 per class)
//   stage 3: OR4 of four stage-2 gates (12 gates, one per class)
//   stage 4: OR2 per output bit (8 gates)
// Every input passes through exactly four gates. The pairing of outputs, the
// four-stage OR structure and the gate counts of stages 2 to 4 follow the
// published design; the exact sharing of stage 1 is this design's own and
// uses three more OR4 gates than the published 108. Combinational.
// enc_in[0] is intentionally unread: value 0x00 has no bit set.
module dse_encoder (
  input  logic [255:0] enc_in,
  output logic [7:0]   y
);

  logic [63:1] s1_a;          // stage 1, quads varying in pair 0
  logic [15:0] s1_b [1:3];    // stage 1, quads varying in pair 3, pair 0 == c
  logic [3:0]  s2 [4][1:3];   // stage 2, [pair][class][group]
  logic        s3 [4][1:3];   // stage 3, [pair][class]

  // Index of the pair-0 quad whose pairs 1..3 hold value c at pair j and the
  // values g (higher remaining pair) and k (lower remaining pair) elsewhere.
  function automatic int unsigned quad_index(int unsigned j, int unsigned c,
                                             int unsigned g, int unsigned k);
    int unsigned m = 0;
    int unsigned pos_hi, pos_lo;   // positions (0..2) of pairs 1..3 inside m
    case (j)
      1:       begin pos_hi = 2; pos_lo = 1; end
      2:       begin pos_hi = 2; pos_lo = 0; end
      default: begin pos_hi = 1; pos_lo = 0; end
    endcase
    m |= c << (2 * (j - 1));
    m |= g << (2 * pos_hi);
    m |= k << (2 * pos_lo);
    return m;
  endfunction

  // Stage 1.
  for (genvar m = 1; m < 64; m++) begin : g_s1_a
    assign s1_a[m] = |enc_in[4*m +: 4];
  end
  for (genvar c = 1; c < 4; c++) begin : g_s1_b_c
    for (genvar t = 0; t < 16; t++) begin : g_s1_b_t
      localparam int unsigned Q = 4 * t + c;
      assign s1_b[c][t] = enc_in[Q] | enc_in[Q + 64] | enc_in[Q + 128] | enc_in[Q + 192];
    end
  end

  // Stage 2.
  for (genvar c = 1; c < 4; c++) begin : g_s2_c
    for (genvar g = 0; g < 4; g++) begin : g_s2_g
      assign s2[0][c][g] = |s1_b[c][4*g +: 4];
      for (genvar j = 1; j < 4; j++) begin : g_s2_j
        assign s2[j][c][g] = s1_a[quad_index(j, c, g, 0)] | s1_a[quad_index(j, c, g, 1)]
                           | s1_a[quad_index(j, c, g, 2)] | s1_a[quad_index(j, c, g, 3)];
      end
    end
  end

  // Stages 3 and 4.
  for (genvar j = 0; j < 4; j++) begin : g_pair
    for (genvar c = 1; c < 4; c++) begin : g_s3
      assign s3[j][c] = |s2[j][c];
    end
    assign y[2*j]   = s3[j][1] | s3[j][3];
    assign y[2*j+1] = s3[j][2] | s3[j][3];
  end

endmodule
