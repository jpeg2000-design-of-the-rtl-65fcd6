// cf_mrc: magnitude refinement coding (MRC) context label, combinational.
//
// A sample refined for the first time takes context 14 when none of its eight
// neighbours is significant and 15 otherwise; later refinements take 16. With
// the two significance states of the pass-parallel scheme the "first refinement"
// flag is sigma0 XOR sigma1, which the caller supplies.
//
// Origin: standard magnitude refinement contexts; taking first refinement as
// sigma0 XOR sigma1 follows the original design.
module cf_mrc
  import cf_pkg::*;
(
  input  logic first_ref,  // sample has not been refined yet (sigma0 ^ sigma1)
  input  nbr_t nbr,        // significance of the eight neighbours
  output cx_t  cx          // context label 14..16
);
  always_comb begin
    if (!first_ref)     cx = 5'd16;
    else if (|nbr)      cx = 5'd15;
    else                cx = 5'd14;
  end
endmodule
