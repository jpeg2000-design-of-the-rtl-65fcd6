// tb_cf_zc: exhaustive test of the zero coding context: all 256 neighbour
// patterns in each of the three sub-band orientations against the reference
// table of tb_cf_ref_pkg.
//
// Origin: the expected values come from the standard JPEG2000 rules and the
// design description, written independently of the RTL; the stimulus and checks
// are this testbench's own.
module tb_cf_zc;
  import cf_pkg::*;
  import tb_cf_ref_pkg::*;

  nbr_t  nbr;
  band_e band;
  cx_t   cx;
  int    checks = 0, failures = 0;

  cf_zc dut (.nbr, .band, .cx);

  initial begin
    for (int b = 0; b < 3; b++)
      for (int n = 0; n < 256; n++) begin
        int h, v, d, e;
        nbr  = nbr_t'(n);
        band = band_e'(b);
        #1;
        h = nbr.h0 + nbr.h1;
        v = nbr.v0 + nbr.v1;
        d = nbr.d0 + nbr.d1 + nbr.d2 + nbr.d3;
        e = ref_zc(h, v, d, b);
        checks++;
        if (cx != 5'(e)) begin
          failures++;
          $display("ERROR band %0d nbr %b: cx %0d expected %0d", b, n, cx, e);
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
