// tb_cf_col_pkg: column-level models for the unit testbenches of the pass
// coding modules.
//
// A three-column window (left, current, right) is unpacked into a 3x6 grid of
// significance bits: position 0 is the sample above the stripe, 1..4 the stripe
// rows, 5 the next stripe (always insignificant, vertical causal mode). Each
// pass model fills the grid with the significance that pass must see, walks the
// four rows in order and lists the context/decision pairs (cx*2 + d) it expects,
// updating the grid as samples become significant. Context numbers come from the
// reference tables of tb_cf_ref_pkg. Random windows are built consistently:
// sp = sigma0|sigma1, signs only on significant samples.
//
// Origin: the models restate the per-pass rules of the design description
// independently of the RTL.
package tb_cf_col_pkg;
  import cf_pkg::*;
  import tb_cf_ref_pkg::*;

  typedef bit grid_t [3][6];
  typedef bit sgrid_t [3][6];

  function automatic col_t rand_col(int dens, bit full);
    col_t c = '0;
    c.valid = 1'b1;
    c.rg    = 1'b1;
    c.rv    = full ? 4'hF : 4'($urandom_range(15) | 1);
    c.ab_s0 = ($urandom_range(99) < dens);
    c.ab_s1 = ($urandom_range(99) < dens);
    c.ab_sgn = $urandom_range(1);
    for (int r = 0; r < 4; r++) if (c.rv[r]) begin
      c.s0[r]  = ($urandom_range(99) < dens);
      c.s1[r]  = ($urandom_range(99) < dens);
      c.sp[r]  = c.s0[r] | c.s1[r];
      c.sgn[r] = $urandom_range(1);
      c.mag[r] = $urandom_range(1);
    end
    return c;
  endfunction

  // returns {h, v, d} counts packed as h*100 + v*10 + d
  function automatic int counts(grid_t g, int p);
    int h = g[0][p] + g[2][p];
    int v = g[1][p-1] + g[1][p+1];
    int d = g[0][p-1] + g[2][p-1] + g[0][p+1] + g[2][p+1];
    return h * 100 + v * 10 + d;
  endfunction

  function automatic int zc_of(grid_t g, int p, int band);
    int k = counts(g, p);
    return ref_zc(k / 100, (k / 10) % 10, k % 10, band);
  endfunction

  function automatic int sc_of(grid_t g, sgrid_t s, int p);
    int hc = 0, vc = 0;
    if (g[0][p]) hc += s[0][p] ? -1 : 1;
    if (g[2][p]) hc += s[2][p] ? -1 : 1;
    if (g[1][p-1]) vc += s[1][p-1] ? -1 : 1;
    if (g[1][p+1]) vc += s[1][p+1] ? -1 : 1;
    return ref_sc(hc, vc);
  endfunction

  function automatic void signs(col_t l, col_t c, col_t r, ref sgrid_t s);
    col_t w [3];
    w[0] = l; w[1] = c; w[2] = r;
    for (int x = 0; x < 3; x++) begin
      s[x][0] = w[x].ab_sgn;
      for (int k = 0; k < 4; k++) s[x][k+1] = w[x].sgn[k];
      s[x][5] = 0;
    end
  endfunction

  // kind: 1 pass 1, 2 pass 2 encode, 3 pass 2 decode, 4 pass 3
  function automatic void fill(col_t l, col_t c, col_t r, int kind, ref grid_t g);
    col_t w [3];
    w[0] = l; w[1] = c; w[2] = r;
    for (int x = 0; x < 3; x++) begin
      g[x][0] = (kind == 4) ? (w[x].ab_s0 | w[x].ab_s1) : w[x].ab_s0;
      for (int k = 0; k < 4; k++)
        case (kind)
          2: g[x][k+1] = w[x].sp[k] | w[x].mag[k];
          3: g[x][k+1] = w[x].sp[k] | w[x].s0[k];
          default: g[x][k+1] = w[x].s0[k] | w[x].s1[k];
        endcase
      g[x][5] = 0;
    end
  endfunction

  function automatic void model_p1(col_t l, col_t c, col_t r, int band, ref int q[$]);
    grid_t g; sgrid_t s;
    fill(l, c, r, 1, g);
    signs(l, c, r, s);
    for (int k = 0; k < 4; k++) begin
      int p = k + 1;
      int k3 = counts(g, p);
      if (c.rv[k] && !c.sp[k] && !c.s0[k] && k3 != 0) begin
        q.push_back(zc_of(g, p, band) * 2 + c.mag[k]);
        if (c.mag[k]) begin
          int t;
          g[1][p] = 1;
          t = sc_of(g, s, p);
          q.push_back((t & ~1) | (c.sgn[k] ^ (t & 1)));
        end
      end
    end
  endfunction

  function automatic void model_p2(col_t l, col_t c, col_t r, bit dec, ref int q[$]);
    grid_t g;
    fill(l, c, r, dec ? 3 : 2, g);
    for (int k = 0; k < 4; k++)
      if (c.rv[k] && c.sp[k]) begin
        int cx;
        if (c.s0[k] && c.s1[k]) cx = 16;
        else cx = (counts(g, k + 1) != 0) ? 15 : 14;
        q.push_back(cx * 2 + c.mag[k]);
      end
  endfunction

  function automatic void model_p3(col_t l, col_t c, col_t r, int band, ref int q[$]);
    grid_t g; sgrid_t s;
    int k = 0;
    bit rl;
    fill(l, c, r, 4, g);
    signs(l, c, r, s);
    rl = (c.rv == 4'hF);
    for (int j = 0; j < 4; j++)
      if (c.sp[j] || c.p1c[j] || counts(g, j + 1) != 0) rl = 0;
    if (rl) begin
      int f = 4;
      for (int j = 3; j >= 0; j--) if (c.mag[j]) f = j;
      q.push_back(34 + (f < 4));
      if (f == 4) k = 4;
      else begin
        int t;
        q.push_back(36 + (f >> 1));
        q.push_back(36 + (f & 1));
        g[1][f+1] = 1;
        t = sc_of(g, s, f + 1);
        q.push_back((t & ~1) | (c.sgn[f] ^ (t & 1)));
        k = f + 1;
      end
    end
    for (; k < 4; k++)
      if (c.rv[k] && !c.sp[k] && !c.p1c[k]) begin
        int p = k + 1;
        q.push_back(zc_of(g, p, band) * 2 + c.mag[k]);
        if (c.mag[k]) begin
          int t;
          g[1][p] = 1;
          t = sc_of(g, s, p);
          q.push_back((t & ~1) | (c.sgn[k] ^ (t & 1)));
        end
      end
  endfunction

  // the register update rule, written independently of cf_col_regs
  function automatic col_t apply_upd(col_t c, upd_t u);
    if (!u.en) return c;
    if (u.set_s0)  c.s0[u.row]  = 1;
    if (u.set_s1)  c.s1[u.row]  = 1;
    if (u.set_p1c) c.p1c[u.row] = 1;
    if (u.wr_mag)  c.mag[u.row] = u.mag;
    if (u.wr_sgn)  c.sgn[u.row] = u.sgn;
    return c;
  endfunction

  // what a decoder knows before coding the column: no magnitude bits, and
  // signs only for samples already significant
  function automatic col_t blind(col_t c);
    col_t b = c;
    b.mag = '0;
    b.sgn = c.sgn & (c.s0 | c.s1);
    return b;
  endfunction
endpackage
