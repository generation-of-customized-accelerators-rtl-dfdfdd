// tb_lpa_fsl_fifo: random writes and reads on a 4-deep link against a
// queue model: order kept, full and exists flags right, no write when full.
module tb_lpa_fsl_fifo;
  import lpa_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  word_t wr_data, rd_data; logic wr, rd, full, exists;
  word_t q [$];
  int n_full = 0;
  lpa_fsl_fifo #(.DEPTH(4)) dut (.*);
  initial begin
    repeat (20000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    wr = 0; rd = 0; wr_data = 0;
    @(negedge clk); rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      checks += 2;
      if (full !== (q.size() == 4)) begin failures++; $display("FAIL full"); end
      if (exists !== (q.size() != 0)) begin failures++; $display("FAIL exists"); end
      if (exists) begin
        checks++;
        if (rd_data !== q[0]) begin failures++; $display("FAIL data"); end
      end
      if (full) n_full++;
      wr = ($urandom % 2) && !full; wr_data = $urandom;
      rd = ($urandom % ((n / 500) % 2 ? 3 : 2) == 0) && exists;
      @(posedge clk);
      if (rd) void'(q.pop_front());
      if (wr) q.push_back(wr_data);
    end
    checks++; if (n_full == 0) begin failures++; $display("FAIL never full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
