// tb_lpa_in_mux: every hot-bit select of a 5-input multiplexer, and the
// all-clear select giving zero.
module tb_lpa_in_mux;
  import lpa_pkg::*;
  int checks = 0, failures = 0;
  word_t d [5];
  logic [4:0] sel;
  word_t y;
  lpa_in_mux #(.N(5)) dut (.d, .sel, .y);
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int n = 0; n < 100; n++) begin
      foreach (d[i]) d[i] = $urandom;
      for (int s = -1; s < 5; s++) begin
        sel = (s < 0) ? 5'd0 : 5'(1 << s);
        #1;
        checks++;
        if (y !== ((s < 0) ? 32'd0 : d[s])) begin failures++; $display("FAIL sel %b", sel); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
