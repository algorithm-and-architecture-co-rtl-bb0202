// sad_4x4_trees: 256 processing units and 16 2-D adder trees.
//
// Each processing unit subtracts a reference pel from the co-located current
// pel and takes the absolute value. The 16 absolute differences of every
// 4x4 block are summed by a 2-D adder tree: the four pels of each row are
// added first, then the four row sums. The result is the SAD of the 16 4x4
// blocks of one search candidate, all in parallel; larger block sizes are
// built from these by vbs_tree (intra-candidate data reuse).
//
// Purely combinational. sad4[4*br+bc] is the 4x4 block in block row br and
// block column bc. The row-then-column order of the additions follows the
// "2-D" tree of the document; the adder widths are this design's choice.
module sad_4x4_trees
  import me_pkg::*;
(
  input  pel_t  cur  [MB][MB],
  input  pel_t  ref_ [MB][MB],
  output sad4_t sad4 [16]
);

  logic [PEL_W-1:0] ad [MB][MB];

  // processing units
  always_comb
    for (int r = 0; r < MB; r++)
      for (int c = 0; c < MB; c++)
        ad[r][c] = (cur[r][c] > ref_[r][c]) ? cur[r][c] - ref_[r][c]
                                            : ref_[r][c] - cur[r][c];

  // 2-D adder trees
  always_comb
    for (int br = 0; br < 4; br++)
      for (int bc = 0; bc < 4; bc++) begin
        logic [PEL_W+1:0] rs [4];
        for (int i = 0; i < 4; i++)
          rs[i] = ({2'b0, ad[4*br+i][4*bc  ]} + {2'b0, ad[4*br+i][4*bc+1]})
                + ({2'b0, ad[4*br+i][4*bc+2]} + {2'b0, ad[4*br+i][4*bc+3]});
        sad4[4*br+bc] = ({2'b0, rs[0]} + {2'b0, rs[1]}) + ({2'b0, rs[2]} + {2'b0, rs[3]});
      end

endmodule
