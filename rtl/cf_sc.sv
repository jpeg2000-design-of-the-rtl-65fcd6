// cf_sc: sign coding (SC) context label and XOR bit, combinational.
//
// Step 1 forms the horizontal and the vertical contribution (-1, 0, +1) from the
// significance and sign of the two neighbours in each direction: a significant
// positive neighbour adds +1, a significant negative one -1, and the sum is
// clipped to -1..+1. Step 2 maps the (H, V) pair onto context 9..13 and the XOR
// bit; the sign decision is sign XOR xorbit (encoding) and the decoded sign is
// decision XOR xorbit (decoding).
//
// Origin: standard JPEG2000 sign coding contributions and context table, as in
// the original design; the signed-contribution arithmetic is this design's own.
module cf_sc
  import cf_pkg::*;
(
  input  logic       sig_h0, sig_h1, sig_v0, sig_v1,  // neighbour significance
  input  logic       sgn_h0, sgn_h1, sgn_v0, sgn_v1,  // neighbour sign (1 = negative)
  output cx_t        cx,                              // context label 9..13
  output logic       xorbit
);
  typedef logic signed [2:0] ctb_t;

  function automatic ctb_t contrib(logic sa, logic na, logic sb, logic nb);
    ctb_t s;
    s = ctb_t'(0);
    if (sa) s = s + (na ? ctb_t'(-1) : ctb_t'(1));
    if (sb) s = s + (nb ? ctb_t'(-1) : ctb_t'(1));
    if (s > ctb_t'(1))  s = ctb_t'(1);
    if (s < ctb_t'(-1)) s = ctb_t'(-1);
    return s;
  endfunction

  ctb_t hc, vc, hn, vn;

  always_comb begin
    hc = contrib(sig_h0, sgn_h0, sig_h1, sgn_h1);
    vc = contrib(sig_v0, sgn_v0, sig_v1, sgn_v1);
    // a negative H (or H = 0 with negative V) flips the XOR bit and both signs
    xorbit = (hc < 0) || (hc == 0 && vc < 0);
    hn = xorbit ? -hc : hc;
    vn = xorbit ? -vc : vc;
    if (hn == 1)       cx = (vn == 1) ? 5'd13 : (vn == 0) ? 5'd12 : 5'd11;
    else               cx = (vn == 0) ? 5'd9 : 5'd10;
  end
endmodule
