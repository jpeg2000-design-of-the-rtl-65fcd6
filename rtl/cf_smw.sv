// cf_smw: significance memory write module (SMW).
//
// When a column reaches register A all three passes are done with it, and SMW
// writes back the significance states {sigma1, sigma0} of the rows whose states
// changed in this bit-plane (the "need-to-be-changed" flag, NBCH). In the first
// bit-plane every existing row is written, since the register data generator
// ignored the memory's old contents there. Like sample skipping, the NBCH flag
// goes through the NBC index converter: one write per marked row, plus one final
// check cycle. Writes have priority on the memory port, so they never wait.
//
// Origin: writing through the NBC converter with a need-to-be-changed flag
// follows the original design; writing every row in the first bit-plane and the
// final check cycle are this design's own.
module cf_smw
  import cf_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,     // a new column enters A on this edge
  input  col_t          ca,        // column A
  output logic          done,
  output logic          we,
  output logic [AW-1:0] addr,
  output logic [1:0]    wdata      // {sigma1, sigma0}
);
  logic            run;
  logic [2:0]      ptr;
  logic [3:0]      flag;
  logic [3:0][1:0] idx;
  logic [2:0]      cnt;

  always_comb begin
    for (int r = 0; r < 4; r++)
      flag[r] = ca.valid & ca.rv[r] & (ca.first | ca.chg[r]) & (3'(r) >= ptr);
  end

  cf_nbc_index u_idx (.flag(flag), .idx(idx), .count(cnt));

  always_comb begin
    done  = !run || cnt == 0;
    we    = run && cnt != 0;
    addr  = {ca.stripe, idx[0], ca.col};
    wdata = {ca.s1[idx[0]], ca.s0[idx[0]]};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run <= 1'b0;
      ptr <= '0;
    end else if (start) begin
      run <= 1'b1;
      ptr <= '0;
    end else if (we) begin
      ptr <= 3'(idx[0]) + 3'd1;
    end
  end
endmodule
