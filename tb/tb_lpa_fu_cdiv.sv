// tb_lpa_fu_cdiv: three constant dividers (7 signed, 10 unsigned, 1 signed)
// are fed a new dividend every cycle; the quotient of the dividend issued
// two cycles earlier must be on y (latency 3 counted from the issue cycle,
// the result being captured at the end of the third cycle).  Expected
// values come from the simulator's own division, truncating toward zero.
module tb_lpa_fu_cdiv;
  import lpa_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  word_t x, y7, y10, y1;
  lpa_fu_cdiv #(.DIVISOR(7),  .SIGNED(1'b1)) d7  (.clk, .x, .y(y7));
  lpa_fu_cdiv #(.DIVISOR(10), .SIGNED(1'b0)) d10 (.clk, .x, .y(y10));
  lpa_fu_cdiv #(.DIVISOR(1),  .SIGNED(1'b1)) d1  (.clk, .x, .y(y1));
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    word_t h [$];
    word_t v, e7, e10;
    word_t corner [8] = '{32'd0, 32'd6, 32'd7, 32'hFFFF_FFF9, 32'h8000_0000, 32'h7FFF_FFFF,
                          32'hFFFF_FFFF, 32'd9};
    for (int i = 0; i < 1210; i++) begin
      @(negedge clk);
      // x issued in cycle i: its quotient is on y in cycle i + 2
      if (h.size() == 2) begin
        v = h.pop_front();
        e7  = word_t'($signed(v) / 7);
        e10 = v / 10;
        checks += 3;
        if (y7 !== e7)   begin failures++; $display("FAIL %h / 7 = %h", v, y7); end
        if (y10 !== e10) begin failures++; $display("FAIL %h / 10 = %h", v, y10); end
        if (y1 !== v)    begin failures++; $display("FAIL %h / 1 = %h", v, y1); end
      end
      x = (i < 8) ? corner[i] : ((i % 4 == 0) ? word_t'($urandom % 100) : $urandom);
      h.push_back(x);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
