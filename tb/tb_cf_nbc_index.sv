// tb_cf_nbc_index: exhaustive test of the NBC flag to NBC index converter
// against the sixteen rows of its conversion table (don't-care entries
// skipped) and the count of marked samples.
//
// Origin: the expected values come from the standard JPEG2000 rules and the
// design description, written independently of the RTL; the stimulus and checks
// are this testbench's own.
module tb_cf_nbc_index;
  logic [3:0]      flag;
  logic [3:0][1:0] idx;
  logic [2:0]      count;
  int              checks = 0, failures = 0;

  cf_nbc_index dut (.flag, .idx, .count);

  // table rows as hex digits N3 N2 N1 N0, 'hf = don't care
  logic [15:0] tbl [16] = '{16'hffff, 16'hfff0, 16'hfff1, 16'hff10, 16'hfff2, 16'hff20, 16'hff21, 16'hf210,
                            16'hfff3, 16'hff30, 16'hff31, 16'hf310, 16'hff32, 16'hf320, 16'hf321, 16'h3210};

  initial begin
    for (int f = 0; f < 16; f++) begin
      int n;
      n = 0;
      flag = 4'(f);
      #1;
      for (int k = 0; k < 4; k++) begin
        logic [3:0] e;
        e = tbl[f][4*k +: 4];
        if (e != 4'hf) begin
          n++;
          checks++;
          if (idx[k] != e[1:0]) begin
            failures++;
            $display("ERROR flag %b: N%0d = %0d expected %0d", flag, k, idx[k], e);
          end
        end
      end
      checks++;
      if (count != 3'(n)) begin
        failures++;
        $display("ERROR flag %b: count %0d expected %0d", flag, count, n);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("ERROR watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
