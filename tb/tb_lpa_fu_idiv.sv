// tb_lpa_fu_idiv: signed and unsigned divisions, including division by
// zero and the most negative dividend.  Each division is started for one
// cycle; the testbench checks that y still shows the previous quotient in
// cycle 33 after the issue, shows the new quotient in cycle 34 (latency 35
// counted with the issue cycle), and that busy drops then.
module tb_lpa_fu_idiv;
  import lpa_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start, uns, busy;
  word_t a, b, y;
  lpa_fu_idiv dut (.*);
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
    word_t ca [6] = '{32'd3, 32'hFFFF_FFFD, 32'd0, 32'd1, 32'hFFFF_FFFF, 32'h8000_0000};
    word_t cb [6] = '{32'd10, 32'd10, 32'd5, 32'h8000_0000, 32'h8000_0000, 32'hFFFF_FFF6};
    start = 0; uns = 0; a = 0; b = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    prev = 0;
    for (int i = 0; i < 240; i++) begin
      uns = i[0];
      if (i < 12) begin a = ca[i / 2]; b = cb[i / 2]; end
      else begin
        a = (i % 3 == 0) ? word_t'($urandom % 50) : $urandom;
        b = $urandom;
        if (i % 5 == 0) a = 0;
      end
      if (a == 0) e = 0;
      else if (uns) e = b / a;
      else if (a == 32'hFFFF_FFFF && b == 32'h8000_0000) e = 32'h8000_0000;
      else e = word_t'($signed(b) / $signed(a));
      start = 1;
      @(negedge clk);          // cycle 1 after the issue
      start = 0; a = $urandom; b = $urandom;
      chk(busy, "busy after start");
      repeat (32) @(negedge clk);   // cycle 33
      chk(y === prev, $sformatf("result not early (%0d)", i));
      @(negedge clk);               // cycle 34
      chk(y === e, $sformatf("%0s %h / %h = %h, want %h", uns ? "u" : "s", b, a, y, e));
      chk(!busy, "idle when done");
      prev = e;
      repeat (i % 3) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
