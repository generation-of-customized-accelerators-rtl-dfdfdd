// tb_lpa_out_fifo: random pushes and commits against a queue model: the
// output register takes the oldest pushed value at each commit, a push in
// the commit step of an empty FIFO goes straight through, start flushes and
// loads the initial value.
module tb_lpa_out_fifo;
  import lpa_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start, push, commit, overflow;
  word_t init, din, q;
  word_t mq [$];
  word_t mo;
  int n_bypass = 0;
  lpa_out_fifo #(.DEPTH(4)) dut (.clk, .rst_n, .start, .init, .push, .din, .commit, .q, .overflow);
  initial begin
    repeat (20000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    start = 0; push = 0; commit = 0; init = 0; din = 0;
    @(negedge clk); rst_n = 1;
    for (int r = 0; r < 20; r++) begin
      @(negedge clk); start = 1; init = $urandom; mo = init; mq.delete();
      @(negedge clk); start = 0;
      checks++; if (q !== mo) begin failures++; $display("FAIL init"); end
      for (int n = 0; n < 40; n++) begin
        push   = ($urandom % 3 != 0) && (mq.size() < 4);
        commit = ($urandom % 2 == 0);
        din    = $urandom;
        @(posedge clk);
        if (push) mq.push_back(din);
        if (commit && mq.size() > 0) begin
          if (mq.size() == 1 && push) n_bypass++;
          mo = mq.pop_front();
        end
        @(negedge clk);
        push = 0; commit = 0;
        checks++;
        if (q !== mo) begin failures++; $display("FAIL r%0d n%0d q=%h exp %h", r, n, q, mo); end
      end
    end
    checks++; if (overflow) begin failures++; $display("FAIL overflow flag"); end
    checks++; if (n_bypass == 0) begin failures++; $display("FAIL no bypass case"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
