// tb_lpa_fu_fmul: back-to-back products, one per cycle, checked three
// cycles after issue against a double-precision reference rounded to
// single; plus overflow to infinity, underflow to zero, 0*inf and NaN.
module tb_lpa_fu_fmul;
  import lpa_pkg::*;
  `include "tb_lpa_fu_fp.svh"
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  word_t a, b, y;
  word_t expq [$];
  lpa_fu_fmul dut (.*);
  initial begin
    repeat (20000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    a = 0; b = 0;
    repeat (2) @(negedge clk);
    for (int i = 0; i < 2006; i++) begin
      word_t e;
      a = rnd_f(70, 190);
      b = rnd_f(70, 190);
      case (i)
        2000: begin a = 32'h7F00_0000; b = 32'h4000_0000; end   // overflow
        2001: begin a = 32'h0100_0000; b = 32'h0080_0000; end   // underflow
        2002: begin a = 32'h7F80_0000; b = 32'h0000_0000; end   // inf * 0
        2003: begin a = 32'h7FC0_0001; b = 32'h3F80_0000; end   // NaN
        2004: begin a = 32'hFF80_0000; b = 32'h3F80_0000; end   // -inf * 1
        2005: begin a = 32'h8000_0000; b = 32'h3F80_0000; end   // -0 * 1
        default: ;
      endcase
      case (i)
        2002, 2003: e = 32'h7FC0_0000;
        2004: e = 32'hFF80_0000;
        2005: e = 32'h8000_0000;
        default: e = d2s(s2d(a) * s2d(b));
      endcase
      expq.push_back(e);
      @(negedge clk);
      if (expq.size() == 2) begin   // result on y in the third cycle
        word_t x;
        x = expq.pop_front();
        checks++;
        if (y !== x) begin failures++; $display("FAIL got %h exp %h", y, x); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
