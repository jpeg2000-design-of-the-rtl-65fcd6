// tb_cf_codec: end-to-end test of the pass-parallel CF codec.
//
// For a series of code-blocks (sizes from 1x1 to the full 32x32, all three
// sub-band orientations, 1 to 8 bit-planes, random coefficients with a skewed
// magnitude distribution) the testbench:
//   1. encodes the block and compares each pass channel's context/decision
//      stream with the serial reference model (tb_cf_ref_pkg);
//   2. decodes it: a stand-in arithmetic decoder checks each requested context
//      against the reference and answers with the reference decision; at the end
//      the coefficient memory must hold the original coefficients.
// The three channels acknowledge after random delays (back-pressure). It counts
// how often each mechanism of the design happens - sample skipping, run-length
// coding with 0 and 1, uniform coding, the ordering stall of the register data
// generator, empty columns shifted in, the F ping-pong buffer full,
// read-modify-write in CMW, channel back-pressure - and counts a failure for any
// that never happened. Cycle counts of the encodes are checked against the
// bound that sample skipping guarantees.
//
// Origin: the expected values come from the standard JPEG2000 rules and the
// design description, written independently of the RTL; the stimulus and checks
// are this testbench's own.
module tb_cf_codec;
  import tb_cf_ref_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic       start, dec, busy, done;
  logic [1:0] band;
  logic [5:0] cb_w, cb_h;
  logic [3:0] num_bp;
  logic [9:0] coef_addr;
  logic       coef_we;
  logic [8:0] coef_wdata, coef_rdata;
  logic [2:0] cx_valid, d_out, ack, d_in;
  logic [2:0][4:0] cx;

  cf_codec dut (
    .clk, .rst_n, .start, .dec, .band, .cb_w, .cb_h, .num_bp, .busy, .done,
    .coef_addr, .coef_we, .coef_wdata, .coef_rdata,
    .p1_cx_valid(cx_valid[0]), .p1_cx(cx[0]), .p1_d(d_out[0]), .p1_ack(ack[0]), .p1_d_in(d_in[0]),
    .p2_cx_valid(cx_valid[1]), .p2_cx(cx[1]), .p2_d(d_out[1]), .p2_ack(ack[1]), .p2_d_in(d_in[1]),
    .p3_cx_valid(cx_valid[2]), .p3_cx(cx[2]), .p3_d(d_out[2]), .p3_ack(ack[2]), .p3_d_in(d_in[2])
  );

  // external coefficient memory: 1024 x 9, synchronous read
  logic [8:0] cmem [1024];
  always_ff @(posedge clk) begin
    if (coef_we) cmem[coef_addr] <= coef_wdata;
    coef_rdata <= cmem[coef_addr];
  end

  int checks = 0, failures = 0;
  int ack_pct = 100;
  int eq1[$], eq2[$], eq3[$];
  longint cyc = 0;
  always_ff @(posedge clk) cyc <= cyc + 1;

  function automatic int q_size(int p);
    return (p == 0) ? eq1.size() : (p == 1) ? eq2.size() : eq3.size();
  endfunction
  function automatic int q_head(int p);
    return (p == 0) ? eq1[0] : (p == 1) ? eq2[0] : eq3[0];
  endfunction
  function automatic int q_pop(int p);
    return (p == 0) ? eq1.pop_front() : (p == 1) ? eq2.pop_front() : eq3.pop_front();
  endfunction
  int got_n [3];
  int err_reported;

  // mechanism counters
  int ev_skip, ev_rl0, ev_rl1, ev_uni, ev_block, ev_fill, ev_ffull, ev_cmw, ev_bp, ev_p2b;

  cf_ref rm;

  // stand-in arithmetic coder / decoder on the three channels
  always_comb begin
    for (int p = 0; p < 3; p++) begin
      d_in[p] = 1'b0;
      if (q_size(p) > 0) d_in[p] = q_head(p) & 1;
    end
  end

  always_ff @(posedge clk) begin
    for (int p = 0; p < 3; p++) begin
      ack[p] <= ($urandom_range(99) < ack_pct);
      if (rst_n && cx_valid[p] && ack[p]) begin
        checks++;
        got_n[p]++;
        if (q_size(p) == 0) begin
          failures++;
          if (err_reported < 10) $display("ERROR pass %0d: unexpected pair cx=%0d (block %0dx%0d, dec=%0d, cycle %0d)", p + 1, cx[p], cb_w, cb_h, dec, cyc);
          err_reported++;
        end else begin
          int e;
          e = q_pop(p);
          if (cx[p] != 5'(e >> 1) || (!dec && d_out[p] != 1'(e & 1))) begin
            failures++;
            if (err_reported < 10)
              $display("ERROR pass %0d pair %0d: got cx=%0d d=%0d, expected cx=%0d d=%0d",
                       p + 1, got_n[p], cx[p], d_out[p], e >> 1, e & 1);
            err_reported++;
          end
        end
      end
      if (cx_valid[p] && !ack[p]) ev_bp++;
    end
    if (dut.u_p1m.done && dut.u_p1m.st != 0 && dut.shift && dut.win[3].valid && dut.win[3].rv == 4'hF &&
        (dut.win[3].p1c != 4'hF) && (dut.win[3].p1c != 0)) ev_skip++;
    if (dut.u_p3m.rl_event) begin
      if (dut.u_p3m.dbit) ev_rl1++; else ev_rl0++;
    end
    if (dut.u_p3m.cx_valid && dut.u_p3m.ack && dut.u_p3m.cx == 5'd18) ev_uni++;
    if (dut.shift && dut.rg_blocked) ev_block++;
    if (dut.shift && dut.f_count == 0) ev_fill++;
    if (dut.f_count == 2) ev_ffull++;
    if (dut.cmw_we) ev_cmw++;
    if (dec && dut.u_p2m.cx_valid && dut.u_p2m.ack) ev_p2b++;
  end

  task automatic run_block(int w, int h, int nbp, int bnd, bit decode, output int cycles);
    longint t0;
    for (int p = 0; p < 3; p++) got_n[p] = 0;
    eq1 = rm.q1;
    eq2 = rm.q2;
    eq3 = rm.q3;
    if (decode)
      foreach (cmem[i]) cmem[i] = '0;
    @(negedge clk);
    dec = decode; band = 2'(bnd); cb_w = 6'(w); cb_h = 6'(h); num_bp = 4'(nbp);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    t0 = cyc;
    wait (done);
    cycles = int'(cyc - t0);
    @(negedge clk);
    for (int p = 0; p < 3; p++) begin
      checks++;
      if (q_size(p) != 0) begin
        failures++;
        $display("ERROR pass %0d: %0d expected pairs never came (%0dx%0d nbp=%0d dec=%0d)",
                 p + 1, q_size(p), w, h, nbp, decode);
      end
    end
  endtask

  task automatic one_config(int w, int h, int nbp, int bnd, int kind);
    int cyc_e, cyc_d, npairs, cols, bad;
    rm.W = w; rm.H = h; rm.nbp = nbp; rm.band = bnd;
    foreach (cmem[i]) cmem[i] = '0;
    for (int r = 0; r < 32; r++)
      for (int c = 0; c < 32; c++) begin
        int m, lim, u;
        lim = (1 << nbp) - 1;
        u = $urandom_range(99);
        case (kind)
          0: m = (u < 50) ? 0 : (u < 80) ? $urandom_range(3) : $urandom_range(lim);
          1: m = (u < 90) ? 0 : $urandom_range(lim);
          default: m = $urandom_range(lim);
        endcase
        if (m > lim) m = lim;
        rm.mag[r][c] = (r < h && c < w) ? m : 0;
        rm.sgn[r][c] = (r < h && c < w && m != 0) ? $urandom_range(1) : 0;
        cmem[r * 32 + c] = {1'(rm.sgn[r][c]), 8'(rm.mag[r][c])};
      end
    rm.run();
    npairs = rm.q1.size() + rm.q2.size() + rm.q3.size();
    run_block(w, h, nbp, bnd, 1'b0, cyc_e);
    // with immediate acknowledgement a column costs at most its pass work plus
    // one check cycle and the memory traffic; bound it loosely per column
    cols = ((h + 3) / 4) * (w + 1) * nbp;
    if (ack_pct == 100) begin
      checks++;
      if (cyc_e > npairs + 16 * cols + 64) begin
        failures++;
        $display("ERROR encode took %0d cycles for %0d pairs, %0d columns", cyc_e, npairs, cols);
      end
    end
    run_block(w, h, nbp, bnd, 1'b1, cyc_d);
    bad = 0;
    for (int r = 0; r < h; r++)
      for (int c = 0; c < w; c++) begin
        checks++;
        if (cmem[r * 32 + c] != {1'(rm.sgn[r][c]), 8'(rm.mag[r][c])}) begin
          failures++;
          if (bad < 5) $display("ERROR decoded coef (%0d,%0d) = %h, expected %h", r, c,
                                cmem[r * 32 + c], {1'(rm.sgn[r][c]), 8'(rm.mag[r][c])});
          bad++;
        end
      end
    $display("block %0dx%0d nbp=%0d band=%0d: %0d pairs, encode %0d cycles, decode %0d cycles",
             w, h, nbp, bnd, npairs, cyc_e, cyc_d);
  endtask

  initial begin
    rm = new();
    start = 0; dec = 0; band = 0; cb_w = 32; cb_h = 32; num_bp = 8;
    err_reported = 0;
    ev_skip = 0; ev_rl0 = 0; ev_rl1 = 0; ev_uni = 0; ev_block = 0; ev_fill = 0;
    ev_ffull = 0; ev_cmw = 0; ev_bp = 0; ev_p2b = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    ack_pct = 100;
    one_config(1, 1, 2, 0, 2);
    one_config(5, 4, 3, 0, 0);
    one_config(8, 8, 4, 1, 0);
    one_config(3, 9, 4, 2, 0);
    one_config(16, 16, 6, 0, 1);
    ack_pct = 70;
    one_config(7, 8, 5, 2, 0);
    one_config(2, 13, 4, 1, 2);
    one_config(32, 32, 8, 0, 0);
    ack_pct = 100;
    one_config(32, 32, 8, 2, 1);
    one_config(32, 6, 5, 1, 2);
    // the 8-row pipeline examples: 7 columns (no stall), 6 and 5 columns (stall)
    one_config(7, 8, 3, 0, 0);
    one_config(6, 8, 3, 0, 0);
    one_config(5, 8, 3, 0, 0);
    $display("events: skip=%0d rl0=%0d rl1=%0d uniform=%0d rg_stall=%0d empty_shift=%0d f_full=%0d cmw_write=%0d backpressure=%0d p2_dec=%0d",
             ev_skip, ev_rl0, ev_rl1, ev_uni, ev_block, ev_fill, ev_ffull, ev_cmw, ev_bp, ev_p2b);
    checks += 10;
    if (ev_skip == 0)  begin failures++; $display("ERROR sample skipping never seen"); end
    if (ev_rl0 == 0)   begin failures++; $display("ERROR run-length 0 never seen"); end
    if (ev_rl1 == 0)   begin failures++; $display("ERROR run-length 1 never seen"); end
    if (ev_uni == 0)   begin failures++; $display("ERROR uniform coding never seen"); end
    if (ev_block == 0) begin failures++; $display("ERROR generator stall never seen"); end
    if (ev_fill == 0)  begin failures++; $display("ERROR empty-column shift never seen"); end
    if (ev_ffull == 0) begin failures++; $display("ERROR F buffer never full"); end
    if (ev_cmw == 0)   begin failures++; $display("ERROR CMW never wrote"); end
    if (ev_bp == 0)    begin failures++; $display("ERROR back-pressure never seen"); end
    if (ev_p2b == 0)   begin failures++; $display("ERROR pass 2 never decoded"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("ERROR watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
