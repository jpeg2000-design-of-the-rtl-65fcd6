// cf_nbc_index: NBC flag to NBC index converter (sample skipping).
//
// The 4-bit NBC (need-to-be-coded) flag marks which of the four samples X0..X3 of
// a column must be coded. The converter lists their positions in coding order,
// N0 first, and counts them, so that a column with n marked samples is visited in
// n steps instead of four. Unused index entries are don't-care in the table the
// design follows; here they repeat position 3 (any value is harmless because the
// caller never reads past the count). Purely combinational.
//
// Origin: the flag-to-index conversion follows the original design's converter
// table; the count output and the value 3 in unused entries are this design's
// own.
module cf_nbc_index (
  input  logic [3:0]      flag,   // bit i = sample Xi needs coding
  output logic [3:0][1:0] idx,    // idx[k] = position of the k-th marked sample
  output logic [2:0]      count   // number of marked samples, 0..4
);
  always_comb begin
    int k;
    idx   = '{default: 2'd3};
    count = 3'd0;
    k     = 0;
    for (int i = 0; i < 4; i++) begin
      if (flag[i]) begin
        idx[k] = 2'(i);
        k      = k + 1;
      end
    end
    count = 3'(k);
  end
endmodule
