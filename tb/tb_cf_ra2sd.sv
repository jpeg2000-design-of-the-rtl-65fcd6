// tb_cf_ra2sd: random write/read traffic on the 1024x2 significance memory,
// compared with an array model; a read must return the word one cycle after
// its address (the old word when the same cycle writes it).
//
// Origin: the expected values come from the standard JPEG2000 rules and the
// design description, written independently of the RTL; the stimulus and checks
// are this testbench's own.
module tb_cf_ra2sd;
  logic       clk = 1'b0;
  logic [9:0] addr;
  logic       we;
  logic [1:0] wdata, rdata;
  logic [1:0] model [1024];
  logic [1:0] expect_q;
  int         checks = 0, failures = 0;

  always #5 clk = ~clk;

  cf_ra2sd dut (.clk, .addr, .we, .wdata, .rdata);

  initial begin
    we = 1'b0; addr = '0; wdata = '0;
    // fill every word once
    for (int a = 0; a < 1024; a++) begin
      @(negedge clk);
      addr = 10'(a); we = 1'b1; wdata = 2'($urandom_range(3));
      model[a] = wdata;
    end
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      addr  = 10'($urandom_range(1023));
      we    = ($urandom_range(2) == 0);
      wdata = 2'($urandom_range(3));
      expect_q = model[addr];
      if (we) model[addr] = wdata;
      @(negedge clk);
      we = 1'b0;
      checks++;
      if (rdata != expect_q) begin
        failures++;
        if (failures < 10) $display("ERROR addr %0d: read %0d expected %0d", addr, rdata, expect_q);
      end
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
