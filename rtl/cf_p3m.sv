// cf_p3m: Pass 3 (cleanup) coding module.
//
// Works on register B, two columns behind pass 1, with A and C as neighbours and
// every neighbour's significance taken as sigma0 OR sigma1 (VIEW_P3). Its rows
// are those neither significant at the start of the bit-plane nor coded in pass
// 1. When all four rows of a full-height column are such rows and none has a
// significant neighbour, the column is run-length coded first: context 17 with
// decision "any magnitude bit is 1"; if 1, two uniform pairs (context 18) give
// the position of the first 1 bit, most significant bit first, and that sample
// then needs only its sign coded. Every other row is zero coded (plus sign coded
// when it becomes significant, which sets sigma1). Rows are chosen with the NBC
// index converter as in cf_p1m; while decoding the run-length and uniform
// decisions arrive on d_in. Channel and update timing as in cf_p1m.
//
// Origin: run-length and uniform coding follow the JPEG2000 rules (the first
// 1's row as two bits, most significant first) and the pass-3 placement two
// columns behind follows the original design; the state machine and channel are
// this design's own.
module cf_p3m
  import cf_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  dec,
  input  band_e band,
  input  logic  start,      // new column enters B on this edge
  input  col_t  cl,         // column A
  input  col_t  cc,         // column B
  input  col_t  cr,         // column C
  output logic  done,
  output logic  cx_valid,
  output cx_t   cx,
  output logic  d_out,
  input  logic  ack,
  input  logic  d_in,
  output upd_t  upd,
  output logic  rl_event    // pulses when a run-length pair is accepted
);
  typedef enum logic [2:0] {S_IDLE, S_RUN, S_SC, S_U1, S_U2} st_e;

  st_e        st;
  logic [2:0] ptr;
  logic [1:0] cur;
  logic [1:0] fidx;         // position of the first 1 in a run-length column

  logic [3:0]      member, flag, quiet;
  logic [3:0][1:0] idx;
  logic [2:0]      cnt;
  logic [1:0]      row, enc_first;
  logic            rlc_ok;
  nbr_t            nb;
  cx_t             zc_cx, sc_cx;
  logic            xorbit, dbit;
  logic [3:0]      nsg;

  always_comb begin
    for (int r = 0; r < 4; r++) begin
      member[r] = cc.rv[r] & ~cc.sp[r] & ~cc.p1c[r];
      quiet[r]  = ~(|neighbours(cl, cc, cr, r, VIEW_P3));
      flag[r]   = member[r] & (3'(r) >= ptr) & ~cc.s1[r];
    end
    rlc_ok = (ptr == 0) && (&cc.rv) && (&member) && (&quiet) && (cc.s1 == 4'b0);
    enc_first = cc.mag[0] ? 2'd0 : cc.mag[1] ? 2'd1 : cc.mag[2] ? 2'd2 : 2'd3;
  end

  cf_nbc_index u_idx (.flag(flag), .idx(idx), .count(cnt));

  always_comb begin
    row = (st == S_SC) ? cur : idx[0];
    nb  = neighbours(cl, cc, cr, int'(row), VIEW_P3);
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
    rl_event = 1'b0;
    case (st)
      S_RUN: if (cnt != 0) begin
        cx_valid = 1'b1;
        if (rlc_ok) begin
          cx       = CX_RL;
          d_out    = |cc.mag;
          dbit     = dec ? d_in : (|cc.mag);
          rl_event = ack;
        end else begin
          d_out      = cc.mag[row];
          dbit       = dec ? d_in : cc.mag[row];
          upd.en     = ack;
          upd.row    = row;
          upd.set_s1 = dbit;
          upd.wr_mag = dec;
          upd.mag    = dbit;
        end
      end
      S_U1: begin
        cx_valid = 1'b1;
        cx       = CX_UNI;
        d_out    = fidx[1];
        dbit     = dec ? d_in : fidx[1];
      end
      S_U2: begin
        cx_valid   = 1'b1;
        cx         = CX_UNI;
        d_out      = fidx[0];
        dbit       = dec ? d_in : fidx[0];
        upd.en     = ack;
        upd.row    = {fidx[1], dbit};
        upd.set_s1 = 1'b1;
        upd.wr_mag = dec;
        upd.mag    = 1'b1;
      end
      S_SC: begin
        cx_valid   = 1'b1;
        cx         = sc_cx;
        d_out      = cc.sgn[row] ^ xorbit;
        upd.en     = ack & dec;
        upd.row    = row;
        upd.wr_sgn = 1'b1;
        upd.sgn    = d_in ^ xorbit;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st   <= S_IDLE;
      ptr  <= '0;
      cur  <= '0;
      fidx <= '0;
    end else if (start) begin
      st  <= S_RUN;
      ptr <= '0;
    end else if (ack && cx_valid) begin
      case (st)
        S_RUN:
          if (rlc_ok) begin
            if (dbit) begin
              st   <= S_U1;
              fidx <= enc_first;
            end else begin
              ptr  <= 3'd4;
            end
          end else if (dbit) begin
            st  <= S_SC;
            cur <= row;
          end else begin
            ptr <= 3'(row) + 3'd1;
          end
        S_U1: begin
          st      <= S_U2;
          fidx[1] <= dbit;
        end
        S_U2: begin
          st  <= S_SC;
          cur <= {fidx[1], dbit};
        end
        default: begin  // S_SC
          st  <= S_RUN;
          ptr <= 3'(cur) + 3'd1;
        end
      endcase
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
