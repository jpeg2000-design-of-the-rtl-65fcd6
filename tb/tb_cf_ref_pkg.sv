// tb_cf_ref_pkg: serial reference model of JPEG2000 tier-1 context formation,
// used by the testbenches to work out expected context/decision pairs.
//
// It codes a code-block the textbook way: bit-plane by bit-plane, each pass
// scanning the whole block in stripe/column/row order, with the classic
// significance, refinement and coded states, vertical causal mode (the row below
// a stripe counts as insignificant). Context tables are written out again here,
// independently of the RTL. Each pass's pairs go to their own queue, encoded as
// cx*2 + d.
//
// Origin: the serial algorithm is the standard JPEG2000 tier-1 coder in
// vertical causal mode; the queue format is this testbench's own.
package tb_cf_ref_pkg;

  function automatic int ref_zc(int h, int v, int d, int band);
    int a, b;
    if (band == 2) begin
      int hv = h + v;
      if (d >= 3) return 8;
      if (d == 2) return (hv >= 1) ? 7 : 6;
      if (d == 1) return (hv >= 2) ? 5 : (hv == 1) ? 4 : 3;
      return (hv >= 2) ? 2 : (hv == 1) ? 1 : 0;
    end
    a = (band == 1) ? v : h;
    b = (band == 1) ? h : v;
    case (a)
      2: return 8;
      1: return (b >= 1) ? 7 : (d >= 1) ? 6 : 5;
      default: return (b == 2) ? 4 : (b == 1) ? 3 : (d >= 2) ? 2 : (d == 1) ? 1 : 0;
    endcase
  endfunction

  // returns cx*2 + xorbit
  function automatic int ref_sc(int hc, int vc);
    if (hc > 1) hc = 1;
    if (hc < -1) hc = -1;
    if (vc > 1) vc = 1;
    if (vc < -1) vc = -1;
    case (hc)
      1:  return 2 * ((vc == 1) ? 13 : (vc == 0) ? 12 : 11);
      0:  return (vc == 1) ? 2 * 10 : (vc == 0) ? 2 * 9 : 2 * 10 + 1;
      default: return 1 + 2 * ((vc == 1) ? 11 : (vc == 0) ? 12 : 13);
    endcase
  endfunction

  class cf_ref;
    int mag [32][32];
    int sgn [32][32];
    int W, H, nbp, band;
    bit sig [32][32];
    bit sig0 [32][32];
    bit refd [32][32];
    bit coded [32][32];
    int q1[$], q2[$], q3[$];
    int n_rl0, n_rl1;

    function bit s(int r, int c, int rc);
      // rc is the row of the sample whose neighbourhood is evaluated
      if (r < 0 || c < 0 || r >= H || c >= W) return 0;
      if (r > rc && (rc % 4) == 3) return 0;   // vertical causal
      return sig[r][c];
    endfunction

    function int cnt_h(int r, int c); return s(r, c-1, r) + s(r, c+1, r); endfunction
    function int cnt_v(int r, int c); return s(r-1, c, r) + s(r+1, c, r); endfunction
    function int cnt_d(int r, int c);
      return s(r-1, c-1, r) + s(r-1, c+1, r) + s(r+1, c-1, r) + s(r+1, c+1, r);
    endfunction

    function int contrib(int r, int c, int rc);
      if (!s(r, c, rc)) return 0;
      return sgn[r][c] ? -1 : 1;
    endfunction

    function void code_sign(int r, int c, ref int q[$]);
      int t = ref_sc(contrib(r, c-1, r) + contrib(r, c+1, r),
                     contrib(r-1, c, r) + contrib(r+1, c, r));
      q.push_back((t & ~1) | (sgn[r][c] ^ (t & 1)));
    endfunction

    function int zc(int r, int c);
      return ref_zc(cnt_h(r, c), cnt_v(r, c), cnt_d(r, c), band);
    endfunction

    function int bit_of(int r, int c, int bp);
      return (mag[r][c] >> bp) & 1;
    endfunction

    function void run();
      q1.delete(); q2.delete(); q3.delete();
      n_rl0 = 0; n_rl1 = 0;
      foreach (sig[r, c]) begin sig[r][c] = 0; refd[r][c] = 0; end
      for (int bp = nbp - 1; bp >= 0; bp--) begin
        foreach (sig[r, c]) begin coded[r][c] = 0; sig0[r][c] = sig[r][c]; end
        // pass 1
        for (int s0 = 0; s0 < H; s0 += 4)
          for (int c = 0; c < W; c++)
            for (int r = s0; r < s0 + 4 && r < H; r++)
              if (!sig[r][c] && (cnt_h(r, c) + cnt_v(r, c) + cnt_d(r, c)) > 0) begin
                int b = bit_of(r, c, bp);
                q1.push_back(zc(r, c) * 2 + b);
                coded[r][c] = 1;
                if (b) begin sig[r][c] = 1; code_sign(r, c, q1); end
              end
        // pass 2
        for (int s0 = 0; s0 < H; s0 += 4)
          for (int c = 0; c < W; c++)
            for (int r = s0; r < s0 + 4 && r < H; r++)
              if (sig0[r][c]) begin
                int cx = !refd[r][c] ? ((cnt_h(r, c) + cnt_v(r, c) + cnt_d(r, c)) ? 15 : 14) : 16;
                q2.push_back(cx * 2 + bit_of(r, c, bp));
                refd[r][c] = 1;
              end
        // pass 3
        for (int s0 = 0; s0 < H; s0 += 4)
          for (int c = 0; c < W; c++) begin
            int r = s0;
            bit rl = (s0 + 3 < H);
            for (int k = 0; k < 4 && rl; k++)
              if (sig[s0+k][c] || coded[s0+k][c] || (cnt_h(s0+k, c) + cnt_v(s0+k, c) + cnt_d(s0+k, c)) != 0)
                rl = 0;
            if (rl) begin
              int f = 4;
              for (int k = 3; k >= 0; k--) if (bit_of(s0+k, c, bp)) f = k;
              q3.push_back(17 * 2 + (f < 4));
              if (f == 4) begin n_rl0++; r = s0 + 4; end
              else begin
                n_rl1++;
                q3.push_back(18 * 2 + (f >> 1));
                q3.push_back(18 * 2 + (f & 1));
                sig[s0+f][c] = 1;
                code_sign(s0 + f, c, q3);
                r = s0 + f + 1;
              end
            end
            for (; r < s0 + 4 && r < H; r++)
              if (!sig0[r][c] && !coded[r][c] && !sig[r][c]) begin
                int b = bit_of(r, c, bp);
                q3.push_back(zc(r, c) * 2 + b);
                if (b) begin sig[r][c] = 1; code_sign(r, c, q3); end
              end
          end
      end
    endfunction
  endclass

endpackage
