// tb_lpa_ctrl: the controller stepping through loop 0's words with a
// scripted exit: operand intake, the address sequence (prolog, steady state
// repeated through the address update, epilog after the exit), the stage
// valid bits, memory ownership and the result transfer.
module tb_lpa_ctrl;
  import lpa_pkg::*;
  import lpa_inst_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic cmd_valid, busy, s_exists, s_read, in_clear, in_wr, m_full, m_write, out_start;
  logic running, exited;
  cmd_t cmd_in, cmd;
  logic [NINW-1:0] in_count, out_idx;
  logic [CAW-1:0] cfg_addr;
  cfg_word_t word;
  logic [NSTG-1:0] iv_issue, iv_live;
  logic [NFU-1:0] exit_hit;
  logic [31:0] run_cycles;
  lpa_ctrl dut (.*);
  lpa_cfg_mem u_cfg (.addr(cfg_addr), .word);

  initial begin
    repeat (20000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // operand counter standing in for the input registers
  always_ff @(posedge clk) if (in_clear) in_count <= 0; else if (in_wr) in_count <= in_count + 1;

  int exit_pass;
  int pass_no;
  always_comb begin
    exit_hit = '0;
    // the iteration started in pass exit_pass exits at its third step
    if (running && word.en[U_BGE] && pass_no == exit_pass && iv_issue[0]) exit_hit[U_BGE] = 1'b1;
  end
  always_ff @(posedge clk) if (!running) pass_no <= -1; else if (word.newpass) pass_no <= pass_no + 1;

  task automatic run(int e);
    int addrs [$];
    int exp [$];
    int nsend = 0;
    exit_pass = e;
    @(negedge clk); cmd_valid = 1; cmd_in = loop_cmd(0);
    @(negedge clk); cmd_valid = 0;
    s_exists = 1;
    while (!running) @(negedge clk);
    s_exists = 0;
    chk(in_count == 7, "seven operands read");
    while (running) begin
      addrs.push_back(int'(cfg_addr));
      if (word.newpass) chk(iv_issue[0] == (pass_no + 1 <= e), "new iteration enters only before the exit");
      @(negedge clk);
    end
    // expected: passes 0,1 prolog; kernel passes up to the exit; one epilog pass
    for (int p = 0; p < 2; p++) for (int s = 0; s < 3; s++) exp.push_back(3 * p + s);
    for (int p = 2; p <= ((e > 2) ? e : 2); p++) for (int s = 0; s < 3; s++) exp.push_back(6 + s);
    for (int s = 0; s < 3; s++) exp.push_back(9 + s);
    chk(addrs == exp, $sformatf("address sequence for exit in pass %0d (%0d words)", e, addrs.size()));
    chk(exited, "exit recorded");
    chk(run_cycles == 32'(exp.size()), "run length");
    m_full = 0;
    #1;
    while (busy) begin
      if (m_write) nsend++;
      @(negedge clk);
    end
    chk(nsend == 7, $sformatf("seven results sent (%0d)", nsend));
  endtask

  initial begin
    cmd_valid = 0; cmd_in = '0; s_exists = 0; m_full = 1; in_count = 0;
    @(negedge clk); rst_n = 1;
    run(0);
    run(1);
    run(2);
    run(7);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
