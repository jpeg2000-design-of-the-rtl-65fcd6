// tb_cf_p2m: unit test of the Pass 2 (magnitude refinement) coding module.
//
// Random three-column windows (dense and sparse significance, full and partial
// columns, all sub-band orientations) are presented to the module. In encode
// mode every emitted context/decision pair is compared with the column model of
// tb_cf_col_pkg; in decode mode the module gets its decisions from that model
// and must rebuild the magnitude bits and signs. The window's current column is
// updated from the module's upd output, as the column registers would do. With
// immediate acknowledgement a column must take exactly one cycle per pair plus
// one final check cycle (sample skipping); other runs use random back-pressure.
//
// Origin: the expected values come from the standard JPEG2000 rules and the
// design description, written independently of the RTL; the stimulus and checks
// are this testbench's own.
module tb_cf_p2m;
  import cf_pkg::*;
  import tb_cf_ref_pkg::*;
  import tb_cf_col_pkg::*;

  logic  clk = 1'b0;
  logic  rst_n = 1'b0;
  always #5 clk = ~clk;

  logic  dec, start, done, cx_valid, d_out, ack, d_in;
  band_e band;
  col_t  cl, cc, cr;
  cx_t   cx;
  upd_t  upd;

  cf_p2m dut (
    .clk, .rst_n, .dec, .start, .cl, .cc, .cr, .done,
    .cx_valid, .cx, .d_out, .ack, .d_in, .upd
  );

  int checks = 0, failures = 0;
  int n_skip = 0, n_rl = 0;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("ERROR %s", msg);
    end
  endtask

  task automatic run_col(col_t l, col_t c, col_t r, bit decode, int ack_pct);
    int q[$];
    int npairs, cycles;
    col_t cur, orig;
    orig = c;
    model_p2(l, c, r, decode, q);
    npairs = q.size();
    if (npairs < 4) n_skip++;
    cur = decode ? blind(c) : c;
    @(negedge clk);
    dec = decode; cl = l; cr = r; cc = cur; start = 1'b1; ack = 1'b0;
    @(negedge clk);
    start = 1'b0;
    cycles = 0;
    forever begin
      ack  = ($urandom_range(99) < ack_pct);
      d_in = (q.size() > 0) ? q[0][0] : 1'b0;
      #1;
      cycles++;
      if (done) break;
      if (rst_n && cx_valid && ack) begin
        int e;
        if (cx == 5'd17) n_rl++;
        check(q.size() > 0, "pair beyond the expected list");
        if (q.size() > 0) begin
          e = q.pop_front();
          check(cx == 5'(e >> 1), $sformatf("cx %0d, expected %0d", cx, e >> 1));
          if (!decode) check(d_out == e[0], "decision");
        end
        cur = apply_upd(cur, upd);
      end
      @(posedge clk);
      cc <= cur;
      @(negedge clk);
      if (cycles > 40) begin
        check(0, "column never finished");
        break;
      end
    end
    check(q.size() == 0, $sformatf("%0d pairs missing", q.size()));
    if (ack_pct == 100) check(cycles == npairs + 1, $sformatf("%0d cycles for %0d pairs", cycles, npairs));
    if (decode) begin
      for (int k = 0; k < 4; k++)
        if (orig.rv[k] && orig.sp[k]) begin
          check(cur.mag[k] == orig.mag[k], "decoded refinement bit");
          check(cur.s0[k] && cur.s1[k], "both significance states set");
        end
    end
  endtask

  initial begin
    col_t l, c, r;
    dec = 0; start = 0; ack = 0; d_in = 0; band = BAND_LL_LH;
    cl = '0; cc = '0; cr = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 600; t++) begin
      int dens;
      dens = (t % 3 == 0) ? 10 : (t % 3 == 1) ? 40 : 75;
      band = band_e'(t % 3);
      l = rand_col(dens, t % 4 != 0);
      c = rand_col(dens, t % 4 != 0);
      r = rand_col(dens, t % 4 != 0);
      if (t % 7 == 0) begin l = '0; r = '0; end
      
      run_col(l, c, r, (t % 2) == 1, (t < 300) ? 100 : 60);
    end
    check(n_skip > 0, "no column with fewer than four pairs");
    
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("ERROR watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
