// cf_p1m: Pass 1 (significance propagation) coding module.
//
// Works on the column in register D, with C and E as its left and right
// neighbours. A stripe row belongs to pass 1 when it is insignificant at the start
// of the bit-plane and at least one neighbour is significant in the pass-1 view
// (cf_pkg::VIEW_P1). The NBC flag of the column is re-evaluated every cycle from
// the live registers, masked to the rows below the last coded one, and turned
// into the next row to code by the NBC index converter (sample skipping): a
// column with n pass-1 samples takes n coding steps plus one final check cycle.
// Because the flag is recomputed after each decision, the same circuit serves
// decoding, where a newly significant sample can pull the rows below into pass 1.
//
// Each coded row emits a zero coding pair; if its decision is 1 the row becomes
// significant (sigma0 set) and a sign coding pair follows. Channel: cx_valid and
// cx (plus d_out while encoding) are held until ack; an immediate assertion
// checks this in simulation. While encoding ack means
// the arithmetic coder took the pair; while decoding ack means d_in carries the
// decoded decision. Register updates leave on upd in the acknowledged cycle.
// start pulses on the clock edge that shifts a new column into D; done is high
// when no further row of the current column needs work.
//
// Origin: the module split, sample skipping through the NBC converter and the
// pass-1 significance rule follow the original design; recomputing the flags
// every cycle, the extra final check cycle and the valid/ack channel are this
// design's own.
module cf_p1m
  import cf_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  dec,        // 1 = decoding
  input  band_e band,
  input  logic  start,      // new column enters D on this edge
  input  col_t  cl,         // column C (left)
  input  col_t  cc,         // column D (current)
  input  col_t  cr,         // column E (right)
  output logic  done,
  output logic  cx_valid,
  output cx_t   cx,
  output logic  d_out,      // decision while encoding
  input  logic  ack,
  input  logic  d_in,       // decision while decoding
  output upd_t  upd
);
  typedef enum logic [1:0] {S_IDLE, S_RUN, S_SC} st_e;

  st_e        st;
  logic [2:0] ptr;          // first row still to be considered
  logic [1:0] cur;          // row waiting for its sign coding

  logic [3:0]      member, flag;
  logic [3:0][1:0] idx;
  logic [2:0]      cnt;
  logic [1:0]      row;
  nbr_t            nb;
  cx_t             zc_cx, sc_cx;
  logic            xorbit, dbit;
  logic [3:0]      nsg;

  always_comb begin
    for (int r = 0; r < 4; r++) begin
      member[r] = cc.rv[r] & ~cc.sp[r] & ~cc.s0[r] & (|neighbours(cl, cc, cr, r, VIEW_P1));
      flag[r]   = member[r] & (3'(r) >= ptr);
    end
  end

  cf_nbc_index u_idx (.flag(flag), .idx(idx), .count(cnt));

  always_comb begin
    row = (st == S_SC) ? cur : idx[0];
    nb  = neighbours(cl, cc, cr, int'(row), VIEW_P1);
    nsg = nbr_signs(cl, cc, cr, int'(row));
  end

  cf_zc u_zc (.nbr(nb), .band(band), .cx(zc_cx));
  cf_sc u_sc (.sig_h0(nb.h0), .sig_h1(nb.h1), .sig_v0(nb.v0), .sig_v1(nb.v1),
              .sgn_h0(nsg[3]), .sgn_h1(nsg[2]), .sgn_v0(nsg[1]), .sgn_v1(nsg[0]),
              .cx(sc_cx), .xorbit(xorbit));

  always_comb begin
    done     = (st == S_IDLE) || (st == S_RUN && cnt == 0);
    cx_valid = 1'b0;
    cx       = zc_cx;
    d_out    = 1'b0;
    dbit     = 1'b0;
    upd      = UPD_NONE;
    if (st == S_RUN && cnt != 0) begin
      cx_valid    = 1'b1;
      d_out       = cc.mag[row];
      dbit        = dec ? d_in : cc.mag[row];
      upd.en      = ack;
      upd.row     = row;
      upd.set_p1c = 1'b1;
      upd.set_s0  = dbit;
      upd.wr_mag  = dec;
      upd.mag     = dbit;
    end else if (st == S_SC) begin
      cx_valid   = 1'b1;
      cx         = sc_cx;
      d_out      = cc.sgn[row] ^ xorbit;
      upd.en     = ack & dec;
      upd.row    = row;
      upd.wr_sgn = 1'b1;
      upd.sgn    = d_in ^ xorbit;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st  <= S_IDLE;
      ptr <= '0;
      cur <= '0;
    end else if (start) begin
      st  <= S_RUN;
      ptr <= '0;
    end else if (ack && cx_valid) begin
      if (st == S_RUN && dbit) begin
        st  <= S_SC;
        cur <= row;
      end else begin
        st  <= S_RUN;
        ptr <= 3'(row) + 3'd1;
      end
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
