// tb_cf_rg: checks the register data generator against memories held in the
// testbench. For several code-block shapes, bit-plane counts and both
// directions it drains the F buffer through a five-place model of the column
// registers at random moments (shifting empty columns while the generator
// reports it is blocked, as the controller does), grants the memory port at
// random, and checks:
//   - every column pushed, in coding order (bit-plane, stripe, column, with one
//     empty separator after each stripe), with the significance, sign and
//     magnitude bits read from the memories (zero significance in the first
//     bit-plane, no magnitude while decoding) and the sample above the stripe;
//   - the ordering rule: a column is only issued once the same column of the
//     stripe above has left the register pipeline;
//   - F never overflows, each read takes one granted cycle, and the generator
//     reports blocked at least once and finished at the end.
//
// Origin: the expected values come from the standard JPEG2000 rules and the
// design description, written independently of the RTL; the stimulus and checks
// are this testbench's own.
module tb_cf_rg;
  import cf_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic          start, dec, gnt, rd_req, push, blocked, finished;
  logic [5:0]    cb_w, cb_h;
  logic [3:0]    num_bp;
  logic [11:0]   retired;
  logic [1:0]    f_count;
  logic [AW-1:0] rd_addr;
  logic [1:0]    sig_rdata;
  logic [COEF_W-1:0] coef_rdata;
  col_t          push_col;

  cf_rg dut (.clk, .rst_n, .start, .dec, .cb_w, .cb_h, .num_bp, .retired, .f_count,
             .gnt, .rd_req, .rd_addr, .sig_rdata, .coef_rdata, .push, .push_col,
             .blocked, .finished);

  logic [1:0]        smem [1024];
  logic [COEF_W-1:0] cmem [1024];
  always_ff @(posedge clk) begin
    sig_rdata  <= smem[rd_addr];
    coef_rdata <= cmem[rd_addr];
  end

  int   checks = 0, failures = 0;
  int   grant_pct;
  col_t fq [$];
  col_t pipe [5];
  col_t exp_q [$];
  int   pushed, n_block, n_reads;
  logic run;

  // F buffer and register pipeline model (the controller's side)
  always_ff @(posedge clk) begin
    gnt <= ($urandom_range(99) < grant_pct);
    if (run) begin
      if (rd_req && gnt) n_reads++;
      if (blocked) n_block++;
      if ($urandom_range(1) == 1 && (fq.size() > 0 || blocked || finished)) begin
        if (pipe[0].rg) retired <= retired + 12'd1;
        for (int k = 0; k < 4; k++) pipe[k] <= pipe[k + 1];
        pipe[4] <= (fq.size() > 0) ? fq.pop_front() : '0;
      end
      if (push) begin
        fq.push_back(push_col);
        checks++;
        if (fq.size() > 2) begin
          failures++;
          $display("ERROR F overflow");
        end
        // ordering rule
        checks++;
        if (push_col.valid && pushed > cb_w && int'(retired) < pushed - int'(cb_w)) begin
          failures++;
          $display("ERROR slot %0d issued with only %0d retired", pushed, retired);
        end
        checks++;
        if (exp_q.size() == 0) begin
          failures++;
          $display("ERROR unexpected column");
        end else begin
          col_t e;
          e = exp_q.pop_front();
          if (push_col != e) begin
            failures++;
            if (failures < 10)
              $display("ERROR slot %0d (bp %0d stripe %0d col %0d): got %h expected %h",
                       pushed, e.bp, e.stripe, e.col, push_col, e);
          end
        end
        pushed++;
      end
      f_count <= 2'(fq.size());
    end
  end

  function automatic void expect_block(int w, int h, int nbp, bit d);
    int reads;
    reads = 0;
    for (int bp = nbp - 1; bp >= 0; bp--)
      for (int s = 0; s * 4 < h; s++)
        for (int c = 0; c <= w; c++) begin
          col_t e;
          e = '0;
          e.rg = 1'b1;
          e.valid = (c < w);
          e.col = 5'(c);
          e.stripe = 3'(s);
          e.bp = 3'(bp);
          e.first = (bp == nbp - 1);
          if (c < w) begin
            if (s > 0) begin
              int a;
              a = (4 * s - 1) * 32 + c;
              e.ab_s0 = smem[a][0];
              e.ab_s1 = smem[a][1];
              e.ab_sgn = cmem[a][8];
              reads++;
            end
            for (int r = 0; r < 4; r++)
              if (4 * s + r < h) begin
                int a;
                a = (4 * s + r) * 32 + c;
                e.rv[r] = 1'b1;
                if (!e.first) begin
                  e.s0[r] = smem[a][0];
                  e.s1[r] = smem[a][1];
                  e.sp[r] = smem[a][0] | smem[a][1];
                end
                e.sgn[r] = cmem[a][8];
                e.mag[r] = d ? 1'b0 : cmem[a][bp];
                reads++;
              end
          end
          exp_q.push_back(e);
        end
    n_reads = -reads;   // counts up to zero when every read happened once
  endfunction

  task automatic one_block(int w, int h, int nbp, bit d, int gp);
    int t;
    foreach (smem[i]) smem[i] = 2'($urandom_range(3));
    foreach (cmem[i]) cmem[i] = COEF_W'($urandom);
    grant_pct = gp;
    expect_block(w, h, nbp, d);
    @(negedge clk);
    foreach (pipe[i]) pipe[i] = '0;
    fq.delete();
    f_count = '0;
    retired = '0; pushed = 0;
    cb_w = 6'(w); cb_h = 6'(h); num_bp = 4'(nbp); dec = d;
    start = 1'b1;
    run = 1'b1;
    @(negedge clk);
    start = 1'b0;
    t = 0;
    while (!(finished && !push && fq.size() == 0) && t < 200000) begin
      @(negedge clk);
      t++;
    end
    run = 1'b0;
    checks += 3;
    if (!finished) begin failures++; $display("ERROR %0dx%0d never finished", w, h); end
    if (exp_q.size() != 0) begin
      failures++;
      $display("ERROR %0dx%0d: %0d columns missing", w, h, exp_q.size());
      exp_q.delete();
    end
    if (n_reads != 0) begin failures++; $display("ERROR %0dx%0d: read count off by %0d", w, h, n_reads); end
  endtask

  initial begin
    start = 0; dec = 0; cb_w = 4; cb_h = 4; num_bp = 1; retired = '0; run = 0;
    grant_pct = 100; n_block = 0;
    foreach (pipe[i]) pipe[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    one_block(1, 1, 1, 0, 100);
    one_block(4, 4, 2, 1, 100);
    one_block(5, 7, 3, 0, 60);
    one_block(3, 13, 2, 1, 80);
    one_block(32, 32, 2, 0, 90);
    one_block(2, 32, 8, 0, 100);
    one_block(32, 5, 3, 1, 70);
    checks++;
    if (n_block == 0) begin failures++; $display("ERROR generator never blocked"); end
    $display("blocked cycles: %0d", n_block);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1_000_000) @(posedge clk);
    failures++;
    $display("ERROR watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
