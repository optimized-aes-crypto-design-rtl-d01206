// dse_decoder - balanced three-stage 8-to-256 decoder of the DSE S-box.
//
// The input byte is turned into 256 one-hot lines in three equal-depth
// stages, so that every line sees the same number of gate levels and hazards
// are not created by unequal arrival times:
//   stage 1: four 2-to-4 sub-decoders on (x7,x6), (x5,x4), (x3,x2), (x1,x0),
//            each a NAND2 of input literals; outputs are active low.
//   stage 2: two 4x4-to-16 sub-decoders, OR2 of two active-low stage-1 lines
//            (32 gates); outputs are still active low.
//   stage 3: one 16x16-to-256 sub-decoder, NOR2 of an upper (x7..x4) and a
//            lower (x3..x0) stage-2 line (256 gates); outputs active high.
// The three-stage structure, the gate types per stage and the gate counts of
// stages 2 and 3 follow the published design; the complements of the inputs
// are written as ~ and left to synthesis. Purely combinational.
module dse_decoder (
  input  logic [7:0]   x,
  output logic [255:0] line
);

  logic [3:0]  s1_n [4];   // stage 1, sub-decoder g decodes x[2g+1:2g]
  logic [15:0] s2_hi_n;    // stage 2, x[7:4]
  logic [15:0] s2_lo_n;    // stage 2, x[3:0]

  // Stage 1: NAND2 of the two literals; line k is low when x[2g+1:2g] == k.
  for (genvar g = 0; g < 4; g++) begin : g_stage1
    for (genvar k = 0; k < 4; k++) begin : g_line
      logic lit1, lit0;
      assign lit1 = k[1] ? x[2*g+1] : ~x[2*g+1];
      assign lit0 = k[0] ? x[2*g]   : ~x[2*g];
      assign s1_n[g][k] = ~(lit1 & lit0);
    end
  end

  // Stage 2: OR2 of active-low lines is the active-low AND.
  for (genvar a = 0; a < 4; a++) begin : g_stage2_a
    for (genvar b = 0; b < 4; b++) begin : g_stage2_b
      assign s2_hi_n[4*a+b] = s1_n[3][a] | s1_n[2][b];
      assign s2_lo_n[4*a+b] = s1_n[1][a] | s1_n[0][b];
    end
  end

  // Stage 3: NOR2 of two active-low lines gives the active-high line.
  for (genvar h = 0; h < 16; h++) begin : g_stage3_h
    for (genvar l = 0; l < 16; l++) begin : g_stage3_l
      assign line[16*h+l] = ~(s2_hi_n[h] | s2_lo_n[l]);
    end
  end

endmodule
