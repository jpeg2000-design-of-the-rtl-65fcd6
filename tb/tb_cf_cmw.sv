// tb_cf_cmw: checks the coefficient memory write module against a memory model
// with one-cycle read latency. For random decoded columns in register A it must
// set magnitude bit bp and the sign in the stored word of exactly the rows whose
// decoded bit is 1, leave every other word alone, use two port cycles per such
// row (read, then write) and report done right after; while encoding it must
// write nothing and be done at once.
//
// Origin: the expected values come from the standard JPEG2000 rules and the
// design description, written independently of the RTL; the stimulus and checks
// are this testbench's own.
module tb_cf_cmw;
  import cf_pkg::*;
  import tb_cf_col_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic              dec, start, done, busy_port, we;
  col_t              ca;
  logic [AW-1:0]     addr;
  logic [COEF_W-1:0] wdata, rdata;
  logic [COEF_W-1:0] mem [1024];
  logic [COEF_W-1:0] ref_mem [1024];
  int                checks = 0, failures = 0;

  cf_cmw dut (.clk, .rst_n, .dec, .start, .ca, .done, .busy_port, .we, .addr, .wdata, .rdata);

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
    rdata <= mem[addr];
  end

  initial begin
    start = 0; ca = '0; dec = 1;
    foreach (mem[i]) begin mem[i] = COEF_W'($urandom); ref_mem[i] = mem[i]; end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 2000; i++) begin
      int n, nw, cyc;
      col_t c;
      c = rand_col(40, $urandom_range(1));
      c.valid  = ($urandom_range(9) != 0);
      c.col    = 5'($urandom);
      c.stripe = 3'($urandom);
      c.bp     = 3'($urandom);
      dec = ($urandom_range(4) != 0);
      nw = 0;
      for (int r = 0; r < 4; r++)
        if (dec && c.valid && c.rv[r] && c.mag[r]) begin
          int a;
          a = {c.stripe, 2'(r), c.col};
          ref_mem[a][c.bp] = 1'b1;
          ref_mem[a][COEF_W-1] = c.sgn[r];
          nw++;
        end
      ca = c;
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      cyc = 0;
      while (!done && cyc < 20) begin
        checks++;
        if (!busy_port) begin failures++; $display("ERROR column %0d: port idle while busy", i); end
        cyc++;
        @(negedge clk);
      end
      checks += 2;
      if (cyc != 2 * nw) begin
        failures++;
        $display("ERROR column %0d: %0d cycles for %0d rows", i, cyc, nw);
      end
      if (busy_port || we) begin failures++; $display("ERROR column %0d: port used after done", i); end
    end
    @(negedge clk);
    foreach (mem[i]) begin
      checks++;
      if (mem[i] != ref_mem[i]) begin
        failures++;
        if (failures < 10) $display("ERROR word %0d = %h, expected %h", i, mem[i], ref_mem[i]);
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
