// tb_cf_smw: checks the significance memory write module. Random columns are
// placed in register A; after the start pulse SMW must write {sigma1, sigma0}
// of exactly the rows that changed (every existing row in the first bit-plane,
// none of an empty column), in row order, at address row*32 + column, one row
// per cycle, and report done in the cycle after the last write (a column with
// n writes takes n+1 cycles).
//
// Origin: the expected values come from the standard JPEG2000 rules and the
// design description, written independently of the RTL; the stimulus and checks
// are this testbench's own.
module tb_cf_smw;
  import cf_pkg::*;
  import tb_cf_col_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic          start, done, we;
  col_t          ca;
  logic [AW-1:0] addr;
  logic [1:0]    wdata;
  int            checks = 0, failures = 0;

  cf_smw dut (.clk, .rst_n, .start, .ca, .done, .we, .addr, .wdata);

  initial begin
    start = 0; ca = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 2000; i++) begin
      int exp_a[$], exp_d[$], n;
      col_t c;
      c = rand_col(40, $urandom_range(1));
      c.valid  = ($urandom_range(9) != 0);
      c.first  = ($urandom_range(3) == 0);
      c.chg    = 4'($urandom);
      c.col    = 5'($urandom);
      c.stripe = 3'($urandom);
      for (int r = 0; r < 4; r++)
        if (c.valid && c.rv[r] && (c.first || c.chg[r])) begin
          exp_a.push_back({c.stripe, 2'(r), c.col});
          exp_d.push_back({c.s1[r], c.s0[r]});
        end
      ca = c;
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      n = 0;
      while (!done && n < 10) begin
        checks++;
        if (!we || exp_a.size() == 0) begin
          failures++;
          $display("ERROR column %0d: no write or extra write in cycle %0d", i, n);
        end else begin
          int a, d;
          a = exp_a.pop_front();
          d = exp_d.pop_front();
          if (addr != AW'(a) || wdata != 2'(d)) begin
            failures++;
            $display("ERROR column %0d: wrote %h@%0d, expected %h@%0d", i, wdata, addr, d, a);
          end
        end
        n++;
        @(negedge clk);
      end
      checks++;
      if (exp_a.size() != 0 || we) begin
        failures++;
        $display("ERROR column %0d: %0d writes missing", i, exp_a.size());
      end
      // stay idle for a random while; done must hold and nothing be written
      repeat ($urandom_range(2)) begin
        @(negedge clk);
        checks++;
        if (!done || we) begin failures++; $display("ERROR activity while idle"); end
      end
    end
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
