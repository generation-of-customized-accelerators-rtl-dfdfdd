// tb_lpa_reg_chain: random write-enable patterns on a 4-register chain,
// compared with a model that shifts each enabled register from the one above.
module tb_lpa_reg_chain;
  import lpa_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  word_t d;
  logic [3:0] we;
  word_t q [4];
  word_t m [4];
  lpa_reg_chain #(.LEN(4)) dut (.clk, .d, .we, .q);
  initial begin
    repeat (5000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    @(negedge clk); d = 0; we = 4'hF;
    for (int i = 0; i < 4; i++) begin @(negedge clk); end
    foreach (m[i]) m[i] = 0;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      d = $urandom;
      we = 4'($urandom);
      if (n % 7 == 0) we = 4'b0011;   // shift only to the first expired value
      @(posedge clk);
      for (int i = 3; i >= 0; i--) if (we[i]) m[i] = (i == 0) ? d : m[i-1];
      #1;
      for (int i = 0; i < 4; i++) begin
        checks++;
        if (q[i] !== m[i]) begin failures++; $display("FAIL n=%0d reg %0d", n, i); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
