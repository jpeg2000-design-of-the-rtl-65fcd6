// cf_zc: zero coding (ZC) context label, combinational.
//
// Counts the significant horizontal (H), vertical (V) and diagonal (D) neighbours
// of a sample and maps them to context 0..8 following the JPEG2000 zero coding
// table. For LL/LH sub-bands H dominates; for HL the roles of H and V swap; for HH
// the diagonal count dominates and H+V is the secondary count. The neighbour bits
// are already reduced to "significant as seen by the current pass" by the caller.
//
// Origin: the table is the standard JPEG2000 zero coding table, as the original
// design uses it; the arithmetic form is this design's own.
module cf_zc
  import cf_pkg::*;
(
  input  nbr_t  nbr,   // significance of the eight neighbours
  input  band_e band,  // sub-band orientation of the code-block
  output cx_t   cx     // context label 0..8
);
  logic [1:0] sh, sv, shv_a, shv_b;
  logic [2:0] sd, shv;

  always_comb begin
    sh  = 2'(nbr.h0) + 2'(nbr.h1);
    sv  = 2'(nbr.v0) + 2'(nbr.v1);
    sd  = 3'(nbr.d0) + 3'(nbr.d1) + 3'(nbr.d2) + 3'(nbr.d3);
    shv = 3'(sh) + 3'(sv);
    // orientation: a = dominant direction, b = the other one
    shv_a = (band == BAND_HL) ? sv : sh;
    shv_b = (band == BAND_HL) ? sh : sv;
    cx = 5'd0;
    if (band == BAND_HH) begin
      if (sd >= 3)                    cx = 5'd8;
      else if (sd == 2)               cx = (shv >= 1) ? 5'd7 : 5'd6;
      else if (sd == 1)               cx = (shv >= 2) ? 5'd5 : (shv == 1) ? 5'd4 : 5'd3;
      else                            cx = (shv >= 2) ? 5'd2 : (shv == 1) ? 5'd1 : 5'd0;
    end else begin
      if (shv_a == 2)                 cx = 5'd8;
      else if (shv_a == 1)            cx = (shv_b >= 1) ? 5'd7 : (sd >= 1) ? 5'd6 : 5'd5;
      else if (shv_b == 2)            cx = 5'd4;
      else if (shv_b == 1)            cx = 5'd3;
      else                            cx = (sd >= 2) ? 5'd2 : (sd == 1) ? 5'd1 : 5'd0;
    end
  end
endmodule
