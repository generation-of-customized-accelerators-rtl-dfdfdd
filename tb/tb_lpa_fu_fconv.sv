// tb_lpa_fu_fconv: integer-to-float conversions of random and corner
// integers (reference: exact conversion to double, then one rounding to
// single) and float-to-integer conversions of random floats of every
// magnitude plus corner cases (reference: truncation of the exact value,
// with saturation outside the integer range).  The unit is combinational;
// each case is checked after a short delay.
module tb_lpa_fu_fconv;
  import lpa_pkg::*;
  `include "tb_lpa_fu_fp.svh"
  int checks = 0, failures = 0;
  logic fn;
  word_t a, y;
  lpa_fu_fconv dut (.*);
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    word_t e;
    real   r;
    word_t ci [6] = '{32'd0, 32'd1, 32'hFFFF_FFFF, 32'h8000_0000, 32'h7FFF_FFFF, 32'h0100_0001};
    word_t cf [6] = '{32'h4F00_0000, 32'hCF00_0000, 32'hCF00_0001, 32'h7FC0_0000,
                      32'h3F7F_FFFF, 32'h0000_0001};
    word_t ce [6] = '{32'h7FFF_FFFF, 32'h8000_0000, 32'h8000_0000, 32'h7FFF_FFFF,
                      32'h0000_0000, 32'h0000_0000};
    for (int i = 0; i < 1006; i++) begin
      fn = 0;
      a = (i < 6) ? ci[i] : ((i % 3 == 0) ? ($urandom >> ($urandom % 32)) : $urandom);
      r = $signed(a);
      e = d2s(r);
      #1;
      checks++;
      if (y !== e) begin failures++; $display("FAIL flt %h = %h want %h", a, y, e); end
    end
    for (int i = 0; i < 1006; i++) begin
      fn = 1;
      if (i < 6) begin a = cf[i]; e = ce[i]; end
      else begin
        a = rnd_f(110, 160);
        r = s2d(a);
        if (r >= 2147483648.0) e = 32'h7FFF_FFFF;
        else if (r < -2147483648.0) e = 32'h8000_0000;
        else e = word_t'($rtoi(r));
      end
      #1;
      checks++;
      if (y !== e) begin failures++; $display("FAIL fint %h = %h want %h", a, y, e); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
