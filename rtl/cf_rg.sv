// cf_rg: register data generator (RG).
//
// Walks the code-block in coding order - bit-plane from the most significant
// coded one down to 0, stripe by stripe, column by column - and for every column
// reads the significance memory and the coefficient memory to build a col_t for
// the F buffer: the sample above the stripe (from the second stripe on) and the
// stripe rows that exist in the code-block. After the last column of each stripe
// it issues one empty separator column, so that the last column of a stripe and
// the first column of the next one never see each other as neighbours.
//
// Ordering rule: a column's slot k (separators counted) may only be read once
// slot k-W-1 has left the pipeline through the memory write modules, because
// that slot is the same column one stripe earlier and owns the sample above
// (and, across bit-planes, the same samples). While it waits for that, "blocked"
// tells the controller to shift empty columns so the pipeline can drain.
//
// Memory timing: both memories are read together at one address per granted
// cycle (gnt), data one cycle later. In the first bit-plane the stripe rows'
// significance is taken as zero instead of the stored value, so the memory
// needs no clearing pass. While encoding the magnitude bit is coefficient bit
// bp; while decoding it starts at 0 and the sign comes from what earlier
// bit-planes wrote back. A column costs one granted cycle per word read (the
// sample above and the existing stripe rows) and one cycle in which the last
// word arrives and the finished column is pushed into F. When F is empty and
// the ordering rule allows, the next column is set up in that same cycle;
// otherwise the generator waits in R_WAIT, one extra cycle at least.
//
// Origin: the job (filling the registers from both memories) and the wait for
// the write-back of the column above follow the original design; the read
// sequence, the separator slot, the slot-count form of the ordering rule and
// the first-bit-plane masking are this design's own.
module cf_rg
  import cf_pkg::*;
(
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,      // begin a code-block
  input  logic           dec,
  input  logic [5:0]     cb_w,       // code-block width 1..32
  input  logic [5:0]     cb_h,       // code-block height 1..32
  input  logic [3:0]     num_bp,     // coded bit-planes 1..8
  input  logic [11:0]    retired,    // slots drained from register A
  input  logic [1:0]     f_count,
  input  logic           gnt,        // memories free for a read this cycle
  output logic           rd_req,     // read request (taken when gnt)
  output logic [AW-1:0]  rd_addr,
  input  logic [1:0]     sig_rdata,  // {sigma1, sigma0}
  input  logic [COEF_W-1:0] coef_rdata,
  output logic           push,
  output col_t           push_col,
  output logic           blocked,
  output logic           finished
);
  typedef enum logic [1:0] {R_IDLE, R_WAIT, R_READ, R_DONE} st_e;

  st_e         st;
  logic [2:0]  bp;
  logic [2:0]  stripe;
  logic [5:0]  col;           // col == cb_w marks the separator slot
  logic [11:0] slot;
  logic [2:0]  pos_iss;       // next position to read: 0 = above, 1..4 = rows
  logic        pend;          // a read is in flight
  logic [2:0]  pos_pend;
  col_t        build;
  logic [3:0]  rows_valid;
  logic [2:0]  last_stripe;
  logic        sep, dep_ok, first_bp, f_room;
  col_t        build_nx;
  // the slot after the current one, and whether it may start right away
  logic [5:0]  nx_col;
  logic [2:0]  nx_stripe, nx_bp;
  logic [11:0] nx_slot;
  logic [3:0]  nx_rows;
  logic        nx_end, nx_sep, nx_go;

  // an empty column record for a slot about to be read
  function automatic col_t fresh(logic [4:0] c, logic [2:0] s, logic [2:0] b, logic first,
                                 logic [3:0] rv, logic is_sep);
    col_t n;
    n        = '0;
    n.rg     = 1'b1;
    n.valid  = !is_sep;
    n.col    = c;
    n.stripe = s;
    n.bp     = b;
    n.first  = first;
    n.rv     = is_sep ? 4'b0 : rv;
    return n;
  endfunction
  logic [4:0]  row_of_pos;

  always_comb begin
    for (int r = 0; r < 4; r++)
      rows_valid[r] = (6'({stripe, 2'(r)}) < cb_h);
    last_stripe = 3'((cb_h - 6'd1) >> 2);
    sep         = (col == cb_w);
    dep_ok      = (slot <= 12'(cb_w)) || (retired >= slot - 12'(cb_w));
    first_bp    = (4'(bp) == num_bp - 4'd1);
    blocked     = (st == R_WAIT) && !dep_ok && !sep;
    finished    = (st == R_DONE);
    // position 0 is the row above the stripe, 1..4 the stripe rows
    row_of_pos  = (pos_iss == 0) ? 5'({stripe, 2'd0} - 5'd1) : 5'({stripe, 2'(pos_iss - 3'd1)});
    rd_addr     = {row_of_pos, col[4:0]};
    // the column under construction including the word arriving this cycle
    build_nx    = build;
    if (pend) begin
      if (pos_pend == 0) begin
        build_nx.ab_s0  = sig_rdata[0];
        build_nx.ab_s1  = sig_rdata[1];
        build_nx.ab_sgn = coef_rdata[COEF_W-1];
      end else begin
        build_nx.s0[pos_pend-1]  = first_bp ? 1'b0 : sig_rdata[0];
        build_nx.s1[pos_pend-1]  = first_bp ? 1'b0 : sig_rdata[1];
        build_nx.sp[pos_pend-1]  = first_bp ? 1'b0 : (sig_rdata[0] | sig_rdata[1]);
        build_nx.sgn[pos_pend-1] = coef_rdata[COEF_W-1];
        build_nx.mag[pos_pend-1] = dec ? 1'b0 : coef_rdata[4'(bp)];
      end
    end
    // room in F, counting a column pushed in this cycle
    f_room      = (3'(f_count) + 3'(push)) < 3'd2;
    // next slot in coding order: column, then separator, stripe, bit-plane
    nx_end    = 1'b0;
    nx_col    = '0;
    nx_stripe = stripe;
    nx_bp     = bp;
    if (!sep) begin
      nx_col = col + 6'd1;
    end else if (stripe != last_stripe) begin
      nx_stripe = stripe + 3'd1;
    end else if (bp != 0) begin
      nx_stripe = '0;
      nx_bp     = bp - 3'd1;
    end else begin
      nx_end = 1'b1;
    end
    nx_slot = slot + 12'd1;
    nx_sep  = (nx_col == cb_w);
    for (int r = 0; r < 4; r++)
      nx_rows[r] = (6'({nx_stripe, 2'(r)}) < cb_h);
    // it can start in the cycle the current column is pushed if F will still
    // have room and the ordering rule allows it
    nx_go = !push && (f_count == 2'd0) &&
            (nx_sep || (nx_slot <= 12'(cb_w)) || (retired >= nx_slot - 12'(cb_w)));
    rd_req      = (st == R_READ) && !sep && (pos_iss <= 3'd4) &&
                  ((pos_iss == 0) ? (stripe != 0) : rows_valid[2'(pos_iss - 3'd1)]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st       <= R_IDLE;
      bp       <= '0;
      stripe   <= '0;
      col      <= '0;
      slot     <= '0;
      pos_iss  <= '0;
      pend     <= 1'b0;
      pos_pend <= '0;
      build    <= '0;
      push     <= 1'b0;
      push_col <= '0;
    end else begin
      push <= 1'b0;
      if (start) begin
        st     <= R_WAIT;
        bp     <= 3'(num_bp - 4'd1);
        stripe <= '0;
        col    <= '0;
        slot   <= '0;
        pend   <= 1'b0;
      end else begin
        // capture the word read in the previous cycle
        if (pend) begin
          pend  <= 1'b0;
          build <= build_nx;
        end
        case (st)
          R_WAIT:
            // wait for room in F (counting the column about to be pushed) and
            // for the column one stripe earlier to be written back
            if (f_room && (sep || dep_ok)) begin
              build   <= fresh(col[4:0], stripe, bp, first_bp, rows_valid, sep);
              pos_iss <= (stripe == 3'd0) ? 3'd1 : 3'd0;  // no row above in stripe 0
              st      <= R_READ;
            end
          R_READ: begin
            if (sep) begin
              pos_iss <= 3'd5;
            end else if (pos_iss <= 3'd4) begin
              if (!rd_req) begin
                pos_iss <= pos_iss + 3'd1;           // nothing to read here
              end else if (gnt) begin
                pend     <= 1'b1;
                pos_pend <= pos_iss;
                pos_iss  <= pos_iss + 3'd1;
              end
            end
            if (pos_iss == 3'd5) begin
              push     <= 1'b1;
              push_col <= build_nx;
              slot     <= slot + 12'd1;
              // advance to the next slot in coding order
              col    <= nx_col;
              stripe <= nx_stripe;
              bp     <= nx_bp;
              if (nx_end) begin
                st <= R_DONE;
              end else if (nx_go) begin
                build   <= fresh(nx_col[4:0], nx_stripe, nx_bp, 4'(nx_bp) == num_bp - 4'd1, nx_rows, nx_sep);
                pos_iss <= (nx_stripe == 3'd0) ? 3'd1 : 3'd0;
                st      <= R_READ;
              end else begin
                st <= R_WAIT;
              end
            end
          end
          default: ;
        endcase
      end
    end
  end
endmodule
