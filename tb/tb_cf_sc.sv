// tb_cf_sc: exhaustive test of the sign coding context and XOR bit: all 256
// combinations of significance and sign of the four horizontal and vertical
// neighbours against the reference contribution tables of tb_cf_ref_pkg.
//
// Origin: the expected values come from the standard JPEG2000 rules and the
// design description, written independently of the RTL; the stimulus and checks
// are this testbench's own.
module tb_cf_sc;
  import cf_pkg::*;
  import tb_cf_ref_pkg::*;

  logic [3:0] sig, sgn;
  cx_t        cx;
  logic       xorbit;
  int         checks = 0, failures = 0;

  cf_sc dut (.sig_h0(sig[0]), .sig_h1(sig[1]), .sig_v0(sig[2]), .sig_v1(sig[3]),
             .sgn_h0(sgn[0]), .sgn_h1(sgn[1]), .sgn_v0(sgn[2]), .sgn_v1(sgn[3]),
             .cx, .xorbit);

  function automatic int c1(logic s, logic n);
    return s ? (n ? -1 : 1) : 0;
  endfunction

  initial begin
    for (int n = 0; n < 256; n++) begin
      int e;
      {sig, sgn} = 8'(n);
      #1;
      e = ref_sc(c1(sig[0], sgn[0]) + c1(sig[1], sgn[1]), c1(sig[2], sgn[2]) + c1(sig[3], sgn[3]));
      checks++;
      if (cx != 5'(e >> 1) || xorbit != e[0]) begin
        failures++;
        $display("ERROR sig %b sgn %b: cx %0d xor %0d expected %0d %0d", sig, sgn, cx, xorbit, e >> 1, e & 1);
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
