// vbs_tree: variable-block-size SAD tree.
//
// Reuses the 16 4x4 SADs of one candidate to form the SADs of all larger
// H.264 partitions in the same cycle: 8 of 8x4, 8 of 4x8, 4 of 8x8, 2 of
// 16x8, 2 of 8x16 and the 16x16 SAD, 41 in all with the 4x4 ones. Larger
// sums are built from smaller ones (4x4 -> 8x4 -> 8x8 -> 16x8 -> 16x16;
// 4x4 -> 4x8; 8x8 -> 8x16), so each level costs one adder per output.
//
// Purely combinational. The output order is given in me_pkg. The document
// gives the tree's role; the adder arrangement is this design's.
module vbs_tree
  import me_pkg::*;
(
  input  sad4_t sad4 [16],
  output sad_t  sad  [NPART]
);

  always_comb begin
    sad_t s8x8 [4];
    for (int i = 0; i < 16; i++) sad[i] = SAD_W'(sad4[i]);
    // 8x4: two horizontally adjacent 4x4
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 2; c++)
        sad[16 + 2*r + c] = SAD_W'(sad4[4*r + 2*c]) + SAD_W'(sad4[4*r + 2*c + 1]);
    // 4x8: two vertically adjacent 4x4
    for (int r = 0; r < 2; r++)
      for (int c = 0; c < 4; c++)
        sad[24 + 4*r + c] = SAD_W'(sad4[8*r + c]) + SAD_W'(sad4[8*r + 4 + c]);
    // 8x8: two vertically adjacent 8x4
    for (int r = 0; r < 2; r++)
      for (int c = 0; c < 2; c++) begin
        s8x8[2*r + c] = sad[16 + 2*(2*r) + c] + sad[16 + 2*(2*r+1) + c];
        sad[32 + 2*r + c] = s8x8[2*r + c];
      end
    // 16x8 and 8x16
    sad[36] = s8x8[0] + s8x8[1];
    sad[37] = s8x8[2] + s8x8[3];
    sad[38] = s8x8[0] + s8x8[2];
    sad[39] = s8x8[1] + s8x8[3];
    // 16x16
    sad[40] = sad[36] + sad[37];
  end

endmodule
