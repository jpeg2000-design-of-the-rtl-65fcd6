// tb_cf_col_regs: checks the column register pipeline: columns pushed into the
// F1/F2 buffer come out into E in order, one per shift, an empty F shifts in an
// empty column, every shift moves B..E one place left, the pass updates land in
// D (pass 1, pass 2 while encoding) and B (pass 3, pass 2 while decoding) and
// mark changed significance for write-back, and clear empties everything.
//
// Origin: the expected values come from the standard JPEG2000 rules and the
// design description, written independently of the RTL; the stimulus and checks
// are this testbench's own.
module tb_cf_col_regs;
  import cf_pkg::*;
  import tb_cf_col_pkg::*;

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic       clear, shift, push, p2_on_b;
  col_t       push_col;
  upd_t       upd_p1, upd_p2, upd_p3;
  col_t [4:0] win;
  logic [1:0] f_count;
  int         checks = 0, failures = 0;
  col_t       model [5];
  col_t       fq [$];

  always #5 clk = ~clk;

  cf_col_regs dut (.clk, .rst_n, .clear, .shift, .push, .push_col, .upd_p1, .upd_p2,
                   .p2_on_b, .upd_p3, .win, .f_count);

  function automatic upd_t rand_upd();
    upd_t u;
    u = upd_t'({$urandom, $urandom});
    u.en = ($urandom_range(2) == 0);
    return u;
  endfunction

  function automatic col_t mark(col_t c_old, col_t c_new);
    // changed significance marks the row for write-back
    for (int r = 0; r < 4; r++)
      if (c_old.s0[r] != c_new.s0[r] || c_old.s1[r] != c_new.s1[r]) c_new.chg[r] = 1'b1;
    return c_new;
  endfunction

  initial begin
    clear = 0; shift = 0; push = 0; p2_on_b = 0; push_col = '0;
    upd_p1 = '0; upd_p2 = '0; upd_p3 = '0;
    foreach (model[i]) model[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 4000; i++) begin
      int act;
      act = $urandom_range(3);
      p2_on_b = $urandom_range(1);
      push  = (act == 0 || act == 3) && (fq.size() < 2);
      shift = (act == 1 || act == 3);
      push_col = rand_col(40, $urandom_range(1));
      push_col.chg = '0;
      upd_p1 = shift ? '0 : rand_upd();
      upd_p2 = shift ? '0 : rand_upd();
      upd_p3 = shift ? '0 : rand_upd();
      // model
      if (shift) begin
        for (int k = 0; k < 4; k++) model[k] = model[k + 1];
        model[4] = (fq.size() > 0) ? fq.pop_front() : '0;
      end else begin
        col_t b, d;
        b = model[1]; d = model[3];
        if (p2_on_b) b = apply_upd(b, upd_p2); else d = apply_upd(d, upd_p2);
        b = apply_upd(b, upd_p3);
        d = apply_upd(d, upd_p1);
        model[1] = mark(model[1], b);
        model[3] = mark(model[3], d);
      end
      if (push) fq.push_back(push_col);
      @(negedge clk);
      for (int k = 0; k < 5; k++) begin
        checks++;
        if (win[k] != model[k]) begin
          failures++;
          if (failures < 10) $display("ERROR step %0d: register %0d differs", i, k);
        end
      end
      checks++;
      if (f_count != 2'(fq.size())) begin
        failures++;
        $display("ERROR step %0d: F holds %0d, expected %0d", i, f_count, fq.size());
      end
    end
    push = 0; shift = 0; upd_p1 = '0; upd_p2 = '0; upd_p3 = '0;
    clear = 1'b1;
    @(negedge clk);
    clear = 1'b0;
    checks++;
    if (win != '0 || f_count != 0) begin
      failures++;
      $display("ERROR clear left data behind");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("ERROR watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
