// tb_lpa_fu_fadd: back-to-back additions and reverse subtractions, one per
// cycle, checked four cycles after issue against a double-precision
// reference rounded to single; plus zero, infinity and NaN cases.
module tb_lpa_fu_fadd;
  import lpa_pkg::*;
  `include "tb_lpa_fu_fp.svh"
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  logic sub; word_t a, b, y;
  word_t expq [$];
  lpa_fu_fadd dut (.*);
  initial begin
    repeat (20000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    word_t sa [8] = '{32'h0, 32'h8000_0000, 32'h7F80_0000, 32'hFF80_0000, 32'h7FC0_0000,
                      32'h3F80_0000, 32'hBF80_0000, 32'h0000_0001};
    int n = 0;
    sub = 0; a = 0; b = 0;
    repeat (2) @(negedge clk);
    for (int i = 0; i < 2000 + 64; i++) begin
      word_t e;
      if (i < 2000) begin
        sub = $urandom % 2;
        a = rnd_f(100, 150);
        b = (i % 5 == 0) ? {~a[31], a[30:23], 23'($urandom)} : rnd_f(int'(a[30:23]) - 20, int'(a[30:23]) + 20);
        e = sub ? d2s(s2d(b) - s2d(a)) : d2s(s2d(a) + s2d(b));
      end else begin
        sub = 0; a = sa[(i - 2000) % 8]; b = sa[(i - 2000) / 8];
        if (a[30:23] == 8'hFF && a[22:0] != 0 || b[30:23] == 8'hFF && b[22:0] != 0) e = 32'h7FC0_0000;
        else if (a[30:23] == 8'hFF && b[30:23] == 8'hFF) e = (a[31] != b[31]) ? 32'h7FC0_0000 : a;
        else if (a[30:23] == 8'hFF) e = a;
        else if (b[30:23] == 8'hFF) e = b;
        else if (a[30:23] == 0 && b[30:23] == 0) e = {a[31] & b[31], 31'd0};
        else if (a[30:23] == 0) e = b;
        else if (b[30:23] == 0) e = a;
        else e = d2s(s2d(a) + s2d(b));
      end
      expq.push_back(e);
      @(negedge clk);
      if (expq.size() == 3) begin  // result on y in the fourth cycle
        word_t x;
        x = expq.pop_front();
        checks++; n++;
        if (y !== x) begin failures++; $display("FAIL got %h exp %h", y, x); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
