// tb_lpa_fu_imul: random and corner operands for the integer multiply
// unit, compared with the low word of a 64-bit product computed in the
// testbench.  The unit is combinational, so each case is checked after a
// short delay.
module tb_lpa_fu_imul;
  import lpa_pkg::*;
  int checks = 0, failures = 0;
  word_t a, b, y;
  lpa_fu_imul dut (.*);
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    logic [63:0] p;
    word_t corner [6] = '{32'd0, 32'd1, 32'hFFFF_FFFF, 32'h8000_0000, 32'h7FFF_FFFF, 32'd65536};
    for (int i = 0; i < 2036; i++) begin
      if (i < 36) begin a = corner[i % 6]; b = corner[i / 6]; end
      else begin a = $urandom; b = (i % 3 == 0) ? word_t'($urandom % 1000) : $urandom; end
      #1;
      p = 64'(a) * 64'(b);
      checks++;
      if (y !== p[31:0]) begin failures++; $display("FAIL %h * %h = %h", a, b, y); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
