// tb_lpa_in_regs: operands written in sequence land in consecutive
// registers; clear restarts at register 0; writes beyond the last are ignored.
module tb_lpa_in_regs;
  import lpa_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic clear, wr;
  word_t wdata;
  word_t q [8];
  logic [3:0] count;
  word_t m [8];
  lpa_in_regs #(.N(8)) dut (.clk, .rst_n, .clear, .wr, .wdata, .q, .count);
  initial begin
    repeat (5000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    clear = 0; wr = 0; wdata = 0;
    @(negedge clk); rst_n = 1;
    for (int r = 0; r < 3; r++) begin
      int n;
      n = (r == 2) ? 10 : 3 + r * 2;
      @(negedge clk); clear = 1; @(negedge clk); clear = 0;
      for (int i = 0; i < n; i++) begin
        wdata = $urandom; wr = 1;
        if (i < 8) m[i] = wdata;
        @(negedge clk);
        wr = 0;
        if (i % 2 == 0) @(negedge clk);
      end
      checks++;
      if (count != 4'((n > 8) ? 8 : n)) begin failures++; $display("FAIL count %0d", count); end
      for (int i = 0; i < ((n > 8) ? 8 : n); i++) begin
        checks++;
        if (q[i] !== m[i]) begin failures++; $display("FAIL reg %0d", i); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
