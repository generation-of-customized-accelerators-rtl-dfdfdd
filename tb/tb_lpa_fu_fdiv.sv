// tb_lpa_fu_fdiv: random and special-case divisions.  The reference is the
// quotient of the two operands in double precision rounded once more to
// single, which equals the correctly rounded single quotient.  Each
// division is started for one cycle; y must still hold the previous result
// in cycle 30 after the issue and the new one in cycle 31 (latency 32).
module tb_lpa_fu_fdiv;
  import lpa_pkg::*;
  `include "tb_lpa_fu_fp.svh"
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start, busy;
  word_t a, b, y;
  lpa_fu_fdiv dut (.*);
  initial begin
    #10000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  initial begin
    word_t e, prev;
    word_t sa [8] = '{32'h0000_0000, 32'h3F80_0000, 32'h7F80_0000, 32'h7F80_0000,
                      32'h7FC0_0000, 32'h0000_0000, 32'h4040_0000, 32'h0000_0001};
    word_t sb [8] = '{32'h3F80_0000, 32'h0000_0000, 32'h3F80_0000, 32'hFF80_0000,
                      32'h3F80_0000, 32'h8000_0000, 32'h3F80_0000, 32'h3F80_0000};
    word_t se [8] = '{32'h7F80_0000, 32'h0000_0000, 32'h0000_0000, 32'h7FC0_0000,
                      32'h7FC0_0000, 32'h7FC0_0000, 32'h3EAA_AAAB, 32'h7F80_0000};
    start = 0; a = 0; b = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    prev = 0;
    for (int i = 0; i < 400; i++) begin
      if (i < 8) begin a = sa[i]; b = sb[i]; e = se[i]; end
      else begin
        a = rnd_f(100, 154);
        b = (i % 4 == 0) ? rnd_f(1, 254) : rnd_f(100, 154);
        if (i % 7 == 0) b[22:0] = a[22:0];     // equal significands
        e = d2s(s2d(b) / s2d(a));
      end
      start = 1;
      @(negedge clk);
      start = 0; a = $urandom; b = $urandom;
      chk(busy, "busy after start");
      repeat (29) @(negedge clk);   // cycle 30
      chk(y === prev, $sformatf("result not early (%0d)", i));
      @(negedge clk);               // cycle 31
      chk(y === e, $sformatf("case %0d: got %h want %h", i, y, e));
      chk(!busy, "idle when done");
      prev = e;
      repeat (i % 2) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
