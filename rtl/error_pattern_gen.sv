// error_pattern_gen: test pattern to flip mask.
//
// Combinational. Test pattern tp (0..15) selects a set of ranks among the 5
// least reliable positions (golay_pkg::tp_ranks): none (0), one of the 5
// single flips (1..5), one of the 6 pairs among the 4 least reliable
// (6..11), or one of the 4 pairs with the fifth (12..15). The mask has a 1
// at each selected position; it is XORed onto the hard decisions of one
// half of the frame. That the patterns test 0s and 1s in the 5 least
// reliable positions, 12 per half, is the document's; the choice of the 12
// patterns is this design's.
module error_pattern_gen
  import golay_pkg::*;
(
  input  idx_t         tp,
  input  idx_t         lrp [L_LRP],
  output logic [K-1:0] mask
);

  logic [L_LRP-1:0] ranks;

  always_comb begin
    ranks = tp_ranks(tp);
    mask  = '0;
    for (int r = 0; r < L_LRP; r++)
      if (ranks[r]) mask[lrp[r]] = 1'b1;
  end

endmodule
