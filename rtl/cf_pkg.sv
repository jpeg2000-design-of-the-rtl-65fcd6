// cf_pkg: types, constants and neighbourhood helpers shared by the pass-parallel
// JPEG2000 context formation (CF) codec.
//
// A code-block of up to 32x32 samples is scanned stripe by stripe (four rows per
// stripe) and column by column. Each column that travels through the column
// register pipeline is described by a col_t: the significance states sigma0/sigma1
// and the sign of its four stripe rows and of the sample just above the stripe (the
// bottom row of the previous stripe), the magnitude bit of the current bit-plane,
// and bookkeeping flags. Sample addresses follow row*32 + column.
//
// The neighbourhood "views" encode which significance each coding pass must see so
// that the three passes, run side by side, produce exactly the contexts of the
// serial order (vertical causal mode: the stripe below counts as insignificant):
//   VIEW_P1  pass 1: in-stripe sigma0|sigma1, row above sigma0
//   VIEW_P2E pass 2 while encoding (same column as pass 1): in-stripe neighbours
//            are significant at the start of the bit-plane or have magnitude bit 1
//            (an insignificant neighbour of a pass-2 sample is always coded in pass
//            1 and becomes significant exactly when its bit is 1); row above sigma0
//   VIEW_P2D pass 2 while decoding (two columns behind pass 1): in-stripe
//            sigma0|start-significance, row above sigma0
//   VIEW_P3  pass 3: sigma0|sigma1 everywhere
//
// Origin: the four-state column representation (sign, magnitude, sigma0,
// sigma1) and the per-pass significance rules follow the pass-parallel method;
// the column record's bookkeeping fields (sp, p1c, chg, tags) and the view
// encoding are this design's own.
package cf_pkg;

  localparam int CB_MAX   = 32;             // largest code-block side
  localparam int AW       = 10;             // sample address width (32x32)
  localparam int MAG_BITS = 8;              // magnitude bit-planes in a coefficient
  localparam int COEF_W   = MAG_BITS + 1;   // sign + magnitude

  typedef logic [4:0] cx_t;                 // context label 0..18
  localparam cx_t CX_RL  = 5'd17;           // run-length context
  localparam cx_t CX_UNI = 5'd18;           // uniform context

  typedef enum logic [1:0] {
    BAND_LL_LH = 2'd0,                      // LL and LH sub-bands
    BAND_HL    = 2'd1,
    BAND_HH    = 2'd2
  } band_e;

  typedef enum logic [1:0] {
    VIEW_P1  = 2'd0,
    VIEW_P2E = 2'd1,
    VIEW_P2D = 2'd2,
    VIEW_P3  = 2'd3
  } view_e;

  // One column of the 5x5 (significance, sign) / 4x5 (magnitude) register window.
  typedef struct packed {
    logic       valid;   // a real code-block column (0: empty separator column)
    logic       rg;      // issued by the register data generator (counted slot)
    logic [4:0] col;     // column number inside the code-block
    logic [2:0] stripe;  // stripe number
    logic [2:0] bp;      // bit-plane being coded
    logic       first;   // first (most significant) coded bit-plane
    logic [3:0] rv;      // stripe row exists in the code-block
    logic       ab_s0;   // sample above the stripe: sigma0, sigma1, sign
    logic       ab_s1;
    logic       ab_sgn;
    logic [3:0] s0;      // sigma0 per stripe row
    logic [3:0] s1;      // sigma1 per stripe row
    logic [3:0] sgn;     // sign per stripe row
    logic [3:0] mag;     // magnitude bit of this bit-plane per stripe row
    logic [3:0] sp;      // significant at the start of this bit-plane
    logic [3:0] p1c;     // coded in pass 1 of this bit-plane
    logic [3:0] chg;     // sigma0/sigma1 changed, must be written back
  } col_t;

  // Register update issued by a pass coding module for one stripe row.
  typedef struct packed {
    logic       en;
    logic [1:0] row;
    logic       set_s0;
    logic       set_s1;
    logic       set_p1c;
    logic       wr_mag;
    logic       mag;
    logic       wr_sgn;
    logic       sgn;
  } upd_t;

  localparam upd_t UPD_NONE = '0;

  // Eight neighbours of a sample: h0 left, h1 right, v0 above, v1 below,
  // d0 up-left, d1 up-right, d2 down-left, d3 down-right.
  typedef struct packed {
    logic h0, h1, v0, v1, d0, d1, d2, d3;
  } nbr_t;

  // Significance of stripe row r (0..3) of column c as seen by view v.
  function automatic logic sig_row(col_t c, int r, view_e v);
    case (v)
      VIEW_P2E: return c.sp[r] | c.mag[r];
      VIEW_P2D: return c.sp[r] | c.s0[r];
      default:  return c.s0[r] | c.s1[r];
    endcase
  endfunction

  // Significance of the sample above the stripe of column c as seen by view v.
  function automatic logic sig_above(col_t c, view_e v);
    return (v == VIEW_P3) ? (c.ab_s0 | c.ab_s1) : c.ab_s0;
  endfunction

  // Significance at vertical position p of column c: p = -1 is the row above,
  // 0..3 the stripe rows, 4 the next stripe (always insignificant).
  function automatic logic sig_at(col_t c, int p, view_e v);
    if (p < 0)      return sig_above(c, v);
    else if (p > 3) return 1'b0;
    else            return sig_row(c, p, v);
  endfunction

  function automatic logic sgn_at(col_t c, int p);
    if (p < 0)      return c.ab_sgn;
    else if (p > 3) return 1'b0;
    else            return c.sgn[p];
  endfunction

  function automatic nbr_t neighbours(col_t l, col_t c, col_t r, int row, view_e v);
    nbr_t n;
    n.h0 = sig_at(l, row, v);
    n.h1 = sig_at(r, row, v);
    n.v0 = sig_at(c, row - 1, v);
    n.v1 = sig_at(c, row + 1, v);
    n.d0 = sig_at(l, row - 1, v);
    n.d1 = sig_at(r, row - 1, v);
    n.d2 = sig_at(l, row + 1, v);
    n.d3 = sig_at(r, row + 1, v);
    return n;
  endfunction

  // Signs of the horizontal and vertical neighbours: {h0, h1, v0, v1}.
  function automatic logic [3:0] nbr_signs(col_t l, col_t c, col_t r, int row);
    return {sgn_at(l, row), sgn_at(r, row), sgn_at(c, row - 1), sgn_at(c, row + 1)};
  endfunction

endpackage
