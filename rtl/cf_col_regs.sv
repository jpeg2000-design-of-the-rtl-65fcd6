// cf_col_regs: column-based register primitives (sign, magnitude, sigma0,
// sigma1) of the pass-parallel CF codec.
//
// Five column registers A..E form the shared context window: pass 1 (and pass 2
// while encoding) works on D with neighbours C and E, pass 3 (and pass 2 while
// decoding) on B with neighbours A and C, and the memory write modules drain A.
// Each column holds five rows of sigma0/sigma1/sign (the sample above the stripe
// plus the four stripe rows) and four magnitude bits. New columns from the
// register data generator wait in a two-entry ping-pong buffer F1/F2, so memory
// reads for the next columns overlap coding.
//
// On shift every column moves one place left (B->A ... E->D) and E takes the
// oldest F entry, or an empty column when F is empty. The three update ports
// apply the pass modules' state changes in the same cycle as their ack; a change
// of sigma0/sigma1 marks the row for write-back. clear empties everything.
//
// Origin: the A..E window, the 5x5 / 4x5 register sizes, the left shift and the
// F1/F2 ping-pong register follow the original design; building F as a
// two-entry queue and the extra bookkeeping bits are this design's own.
module cf_col_regs
  import cf_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       clear,
  input  logic       shift,
  input  logic       push,       // new column from the register data generator
  input  col_t       push_col,
  input  upd_t       upd_p1,     // applies to D
  input  upd_t       upd_p2,     // applies to D (encoding) or B (decoding)
  input  logic       p2_on_b,
  input  upd_t       upd_p3,     // applies to B
  output col_t [4:0] win,        // win[0] = A ... win[4] = E
  output logic [1:0] f_count
);
  col_t [4:0] regs;
  col_t [1:0] fbuf;              // ping-pong entries F1/F2
  logic       f_rd;              // entry holding the oldest column

  function automatic col_t apply(col_t c, upd_t u);
    col_t n = c;
    if (u.en) begin
      if (u.set_s0 && !c.s0[u.row]) begin n.s0[u.row] = 1'b1; n.chg[u.row] = 1'b1; end
      if (u.set_s1 && !c.s1[u.row]) begin n.s1[u.row] = 1'b1; n.chg[u.row] = 1'b1; end
      if (u.set_p1c) n.p1c[u.row] = 1'b1;
      if (u.wr_mag)  n.mag[u.row] = u.mag;
      if (u.wr_sgn)  n.sgn[u.row] = u.sgn;
    end
    return n;
  endfunction

  assign win = regs;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      regs    <= '0;
      fbuf    <= '0;
      f_rd    <= 1'b0;
      f_count <= 2'd0;
    end else if (clear) begin
      regs    <= '0;
      f_rd    <= 1'b0;
      f_count <= 2'd0;
    end else begin
      if (shift) begin
        regs[0] <= regs[1];
        regs[1] <= regs[2];
        regs[2] <= regs[3];
        regs[3] <= regs[4];
        regs[4] <= (f_count != 0) ? fbuf[f_rd] : '0;
      end else begin
        regs[1] <= apply(p2_on_b ? apply(regs[1], upd_p2) : regs[1], upd_p3);
        regs[3] <= apply(p2_on_b ? regs[3] : apply(regs[3], upd_p2), upd_p1);
      end
      if (push) fbuf[f_rd ^ f_count[0]] <= push_col;
      if (shift && f_count != 0) f_rd <= ~f_rd;
      f_count <= f_count + 2'(push) - 2'(shift && f_count != 0);
    end
  end
endmodule
