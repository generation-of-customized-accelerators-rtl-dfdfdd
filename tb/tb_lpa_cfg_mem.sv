// tb_lpa_cfg_mem: the configuration image of loop 0 (II 3, 2 stages)
// against the layout worked out by hand from its schedule: 6 prolog words,
// 3 steady-state words, 3 epilog words; where loads, stores, commits,
// address update and done fall; the first-iteration operand selection.
module tb_lpa_cfg_mem;
  import lpa_pkg::*;
  import lpa_inst_pkg::*;
  int checks = 0, failures = 0;
  logic [CAW-1:0] addr;
  cfg_word_t word;
  lpa_cfg_mem dut (.addr, .word);
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL word %0d: %s", addr, what); end
  endtask
  initial begin
    for (int w = 0; w < 12; w++) begin
      addr = CAW'(w); #1;
      chk(word.newpass == (w % 3 == 0), "newpass");
      chk(word.en[U_LS0] == (w == 0 || w == 3 || w == 6 || w == 4 || w == 7 || w == 10), "LS0 enable");
      chk(word.en[U_BGE] == (w == 2 || w == 5 || w == 8), "exit enable");
      chk(word.en[U_OR] == (w == 3 || w == 6 || w == 9), "or enable");
      chk(word.commit == (w == 4 || w == 7 || w == 10), "commit");
      chk(word.addr_upd == ((w == 8) ? CAW'(2) : CAW'(0)), "address update");
      chk(word.done == (w == 11), "done");
      chk(word.we[CH_BASE[U_IADD] +: 3] == 3'b111, "iadd chain shifts every step");
      chk(word.we[CH_BASE[U_LS0]] == (w % 3 == 1), "load result write");
      if (w == 0) chk(word.sel[U_LS0][0] == 6'b000010, "first load uses input r3");
      if (w == 6) chk(word.sel[U_LS0][0] == 6'b000100, "steady load uses the pool");
      if (w == 3) chk(word.sel[U_OR][1] == 6'b000001, "first or uses input r9");
      if (w == 9) chk(word.sel[U_OR][1] == 6'b000010, "later or uses the bll chain");
      if (w == 4 || w == 7) chk(word.fn[U_LS0] == 3'(LS_SW) && word.stg[U_LS0] == 2'd1, "store stage 1");
    end
    // loop 1 starts after loop 0 and ends with done 24 words later
    addr = CAW'(loop_start(1) + 23); #1;
    chk(loop_start(1) == 12 && word.done, "loop 1 layout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
