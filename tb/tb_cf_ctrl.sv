// tb_cf_ctrl: checks the controller with random module status. Each cycle it
// draws the done flags of the five column modules, the F fill level, the
// generator's blocked/finished flags, the register contents and the memory
// requests, and checks against the rules written out here:
//   - the pipeline shifts only when busy, every module is done, and a column
//     waits in F, or the generator is blocked, or it has finished while real
//     columns remain;
//   - "retired" counts counted slots leaving register A and restarts at start;
//   - SMW writes and CMW traffic take their memory ports first, and the
//     generator is granted only when both ports are free;
//   - busy drops with a single done pulse once the generator has finished and
//     the pipeline and F are empty.
//
// Origin: the expected values come from the standard JPEG2000 rules and the
// design description, written independently of the RTL; the stimulus and checks
// are this testbench's own.
module tb_cf_ctrl;
  import cf_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic              start, busy, done, clear;
  logic              p1_done, p2_done, p3_done, smw_done, cmw_done;
  logic [1:0]        f_count;
  logic              rg_blocked, rg_finished, shift;
  col_t [4:0]        win;
  logic [11:0]       retired;
  logic              smw_we, rg_req, rg_gnt, sig_we, cmw_busy, cmw_we, coef_we;
  logic [AW-1:0]     smw_addr, rg_addr, sig_addr, cmw_addr, coef_addr;
  logic [1:0]        smw_wdata, sig_wdata;
  logic [COEF_W-1:0] cmw_wdata, coef_wdata;
  int                checks = 0, failures = 0;
  int                n_shift, n_done;

  cf_ctrl dut (.*);

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("ERROR %s", what);
    end
  endtask

  task automatic randomize_inputs(bit fin_phase);
    p1_done = ($urandom_range(3) != 0);
    p2_done = ($urandom_range(3) != 0);
    p3_done = ($urandom_range(3) != 0);
    smw_done = ($urandom_range(3) != 0);
    cmw_done = ($urandom_range(3) != 0);
    f_count = fin_phase ? 2'd0 : 2'($urandom_range(2));
    rg_blocked = fin_phase ? 1'b0 : ($urandom_range(4) == 0);
    rg_finished = fin_phase;
    for (int i = 0; i < 5; i++) begin
      win[i] = '0;
      if (!fin_phase || $urandom_range(3) == 0) begin
        win[i].valid = $urandom_range(1);
        win[i].rg = $urandom_range(1);
      end
    end
    smw_we = $urandom_range(1);
    smw_addr = AW'($urandom);
    smw_wdata = 2'($urandom);
    rg_req = $urandom_range(1);
    rg_addr = AW'($urandom);
    cmw_busy = $urandom_range(1);
    cmw_we = cmw_busy & $urandom_range(1);
    cmw_addr = AW'($urandom);
    cmw_wdata = COEF_W'($urandom);
  endtask

  initial begin
    int exp_ret;
    start = 0;
    randomize_inputs(0);
    n_shift = 0; n_done = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(!busy && !shift, "busy or shifting before start");
    for (int blk = 0; blk < 50; blk++) begin
      int len;
      start = 1'b1;
      #1;
      check(clear, "no clear with start");
      @(negedge clk);
      start = 1'b0;
      check(busy && retired == 0, "start did not set busy and reset retired");
      exp_ret = 0;
      len = $urandom_range(200);
      for (int t = 0; t < len + 50; t++) begin
        bit fin_phase, exp_shift, any, alld;
        fin_phase = (t >= len);
        randomize_inputs(fin_phase);
        #1;
        any = 1'b0;
        for (int i = 0; i < 5; i++) any |= win[i].valid | win[i].rg;
        alld = p1_done & p2_done & p3_done & smw_done & cmw_done;
        exp_shift = busy & alld & (f_count != 0 || rg_blocked || (rg_finished && any));
        check(shift == exp_shift, $sformatf("shift=%0d expected %0d", shift, exp_shift));
        check(rg_gnt == (rg_req && !smw_we && !cmw_busy), "generator grant");
        check(sig_we == smw_we && sig_addr == (smw_we ? smw_addr : rg_addr) && sig_wdata == smw_wdata,
              "significance port mux");
        check(coef_we == cmw_we && coef_addr == (cmw_busy ? cmw_addr : rg_addr) && coef_wdata == cmw_wdata,
              "coefficient port mux");
        if (shift) n_shift++;
        if (shift && win[0].rg) exp_ret++;
        if (busy && fin_phase && !any) begin
          // finishing condition: one done pulse, then idle
          @(negedge clk);
          check(done && !busy, "no done pulse at the end");
          check(int'(retired) == exp_ret, $sformatf("retired=%0d expected %0d", retired, exp_ret));
          n_done++;
          @(negedge clk);
          check(!done, "done longer than one cycle");
          break;
        end
        @(negedge clk);
        check(!done, "done while work remains");
        check(int'(retired) == exp_ret, $sformatf("retired=%0d expected %0d", retired, exp_ret));
      end
      check(!busy, "block never finished");
    end
    check(n_done == 50 && n_shift > 0, "not every block finished");
    $display("shifts: %0d, blocks: %0d", n_shift, n_done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("ERROR watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
