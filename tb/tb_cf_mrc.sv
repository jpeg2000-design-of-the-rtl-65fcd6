// tb_cf_mrc: exhaustive test of the magnitude refinement context: every
// neighbour pattern with and without the first-refinement flag.
//
// Origin: the expected values come from the standard JPEG2000 rules and the
// design description, written independently of the RTL; the stimulus and checks
// are this testbench's own.
module tb_cf_mrc;
  import cf_pkg::*;

  logic first_ref;
  nbr_t nbr;
  cx_t  cx;
  int   checks = 0, failures = 0;

  cf_mrc dut (.first_ref, .nbr, .cx);

  initial begin
    for (int f = 0; f < 2; f++)
      for (int n = 0; n < 256; n++) begin
        int e;
        first_ref = 1'(f);
        nbr = nbr_t'(n);
        #1;
        e = (f == 0) ? 16 : (n == 0) ? 14 : 15;
        checks++;
        if (cx != 5'(e)) begin
          failures++;
          $display("ERROR first %0d nbr %b: cx %0d expected %0d", f, n, cx, e);
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
