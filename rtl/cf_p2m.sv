// cf_p2m: Pass 2 (magnitude refinement) coding module.
//
// Codes every stripe row that was significant at the start of the bit-plane,
// skipping the others through the NBC index converter, one row per step plus one
// final check cycle. The context comes from cf_mrc: "first refinement" is
// sigma0 XOR sigma1 and the neighbour test uses the pass-2 view. While encoding
// the module sits on register D, in step with pass 1, and predicts which
// neighbours pass 1 will make significant from their magnitude bits
// (VIEW_P2E). While decoding the magnitude bits are not known in advance, so the
// caller feeds it register B, two columns behind pass 1 (VIEW_P2D). A coded row
// gets both sigma0 and sigma1 set. Channel and update timing as in cf_p1m.
//
// Origin: the placement on D (encoding) and B (decoding) and the magnitude-bit
// prediction follow the original design; the channel and the one-cycle check at
// the end of a column are this design's own.
module cf_p2m
  import cf_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  dec,        // 1 = decoding (window B), 0 = encoding (window D)
  input  logic  start,
  input  col_t  cl,
  input  col_t  cc,
  input  col_t  cr,
  output logic  done,
  output logic  cx_valid,
  output cx_t   cx,
  output logic  d_out,
  input  logic  ack,
  input  logic  d_in,
  output upd_t  upd
);
  typedef enum logic {S_IDLE, S_RUN} st_e;

  st_e        st;
  logic [2:0] ptr;

  logic [3:0]      flag;
  logic [3:0][1:0] idx;
  logic [2:0]      cnt;
  logic [1:0]      row;
  nbr_t            nb;
  logic            dbit;

  always_comb begin
    for (int r = 0; r < 4; r++)
      flag[r] = cc.rv[r] & cc.sp[r] & (3'(r) >= ptr);
  end

  cf_nbc_index u_idx (.flag(flag), .idx(idx), .count(cnt));

  always_comb begin
    row = idx[0];
    nb  = neighbours(cl, cc, cr, int'(row), dec ? VIEW_P2D : VIEW_P2E);
  end

  cf_mrc u_mrc (.first_ref(cc.s0[row] ^ cc.s1[row]), .nbr(nb), .cx(cx));

  always_comb begin
    done     = (st == S_IDLE) || (cnt == 0);
    cx_valid = (st == S_RUN) && (cnt != 0);
    d_out    = cc.mag[row];
    dbit     = dec ? d_in : cc.mag[row];
    upd        = UPD_NONE;
    upd.en     = cx_valid & ack;
    upd.row    = row;
    upd.set_s0 = 1'b1;
    upd.set_s1 = 1'b1;
    upd.wr_mag = dec;
    upd.mag    = dbit;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st  <= S_IDLE;
      ptr <= '0;
    end else if (start) begin
      st  <= S_RUN;
      ptr <= '0;
    end else if (cx_valid && ack) begin
      ptr <= 3'(row) + 3'd1;
    end
  end

  // channel rule: a pair that was offered (outside a start cycle) and not
  // acknowledged is offered again, unchanged, in the next cycle (checked in
  // simulation only)
  logic waiting_q;
  cx_t  cx_q;
  logic d_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      waiting_q <= 1'b0;
      cx_q      <= '0;
      d_q       <= 1'b0;
    end else begin
      waiting_q <= cx_valid && !ack && !start;
      cx_q      <= cx;
      d_q       <= d_out;
      if (waiting_q)
        assert (cx_valid && cx == cx_q && (dec || d_out == d_q))
          else $error("%m: pair withdrawn or changed before ack (valid=%0d cx=%0d, was %0d)", cx_valid, cx, cx_q);
    end
  end
endmodule
