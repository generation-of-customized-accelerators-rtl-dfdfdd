// tb_lpa_injector: loop-start fetches are replaced by the branch to the
// routine and send the command; the return fetch passes; other fetches and
// a disabled injector are transparent.
module tb_lpa_injector;
  import lpa_pkg::*;
  import lpa_inst_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic enable, i_fetch, cmd_valid;
  word_t i_addr, mem_rdata, i_rdata;
  cmd_t cmd;
  lpa_injector dut (.*);
  initial begin
    repeat (20000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  // the memory returns address+1 as the instruction
  always_ff @(posedge clk) mem_rdata <= i_addr + 1;
  task automatic fetch(word_t a, bit exp_inj, word_t cr, int l);
    @(negedge clk); i_fetch = 1; i_addr = a;
    @(negedge clk); i_fetch = 0;
    checks += 2;
    if (i_rdata !== (exp_inj ? (32'hB808_0000 | cr) : a + 1)) begin
      failures++; $display("FAIL fetch %h -> %h", a, i_rdata);
    end
    if (cmd_valid !== exp_inj) begin failures++; $display("FAIL cmd_valid at %h", a); end
    if (exp_inj) begin
      checks++;
      if (cmd !== loop_cmd(l)) begin failures++; $display("FAIL cmd"); end
    end
  endtask
  initial begin
    enable = 1; i_fetch = 0; i_addr = 0;
    @(negedge clk); rst_n = 1;
    fetch(32'h0FC, 0, 0, 0);
    fetch(32'h100, 1, 32'h1000, 0);   // loop 0 start
    fetch(32'h104, 0, 0, 0);
    fetch(32'h100, 0, 0, 0);          // return from the routine
    fetch(32'h200, 1, 32'h1100, 1);   // loop 1 start
    fetch(32'h200, 0, 0, 1);
    fetch(32'h100, 1, 32'h1000, 0);   // re-armed
    fetch(32'h100, 0, 0, 0);
    enable = 0;
    fetch(32'h200, 0, 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
