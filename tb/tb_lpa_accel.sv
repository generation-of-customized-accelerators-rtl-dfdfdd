// tb_lpa_accel: the accelerator on its own, with a behavioural two-port
// memory and the host links driven directly.  Loops 0 to 4 are each
// commanded, fed, run and read back (loop 0 also with an exit in its
// first iteration, loop 2 with 0, 1, 2 and 24 iterations, loop 3 with
// 5, 1 and 3 divisions, one of them by zero, loop 4 with 4, 1 and 2
// fp divisions); results, memory and run length are
// compared with models of the loops.
// The fp quotients are compared with the double-precision quotient
// rounded once to single, which is the correctly rounded result.
// Timing: the memory answers reads one clock after the request, like the
// block RAM in the full system; the host links are read and written with
// values sampled at the clock edge.  The expected run lengths (one
// iteration per II cycles plus the prolog passes) follow the document's
// execution model; the memory size and the operand values are my own.
module tb_lpa_accel;
  import lpa_pkg::*;
  import lpa_inst_pkg::*;
  `include "tb_lpa_fu_fp.svh"
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic cmd_valid; cmd_t cmd_in;
  word_t s_data, m_data; logic s_exists, s_read, m_write, m_full;
  logic mem_own; logic [1:0] p_en; logic [1:0][3:0] p_we;
  word_t p_addr [2], p_wdata [2], p_rdata [2];
  logic busy, exited, fifo_overflow; logic [31:0] run_cycles;
  lpa_accel dut (.*);

  // behavioural memory, 4096 words, one-cycle read
  logic [31:0] mem [4096];
  always_ff @(posedge clk)
    for (int p = 0; p < 2; p++) if (p_en[p]) begin
      for (int k = 0; k < 4; k++) if (p_we[p][k]) mem[p_addr[p][13:2]][8*k +: 8] <= p_wdata[p][8*k +: 8];
      p_rdata[p] <= mem[p_addr[p][13:2]];
    end

  initial begin
    repeat (50000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // host side: operands from a queue, results into a queue
  word_t opq [$];
  word_t resq [$];
  assign s_exists = opq.size() != 0;
  assign s_data   = s_exists ? opq[0] : '0;
  always @(posedge clk) begin
    logic rd, wr; word_t d;
    rd = s_read; wr = m_write; d = m_data;
    #1;
    if (rd) void'(opq.pop_front());
    if (wr) resq.push_back(d);
  end

  task automatic go(int l, word_t ops []);
    resq.delete();
    foreach (ops[i]) opq.push_back(ops[i]);
    @(negedge clk); cmd_valid = 1; cmd_in = loop_cmd(l);
    @(negedge clk); cmd_valid = 0;
    @(negedge clk);
    while (busy) @(negedge clk);
  endtask

  initial begin
    word_t r3, r5, r8, r9, r4, r10, r18, t, r5n, cmpv, q;
    word_t ops [];
    int e;
    int nl2 [4] = '{1, 2, 3, 25};
    int nl3 [3] = '{6, 2, 4};
    word_t dl3 [3] = '{32'd7, 32'hFFFF_FFFD, 32'd0};
    int nl4 [3] = '{5, 2, 3};
    word_t dl4 [3] = '{32'h4040_0000, 32'hBF00_0000, 32'h3FE0_0000};
    cmd_valid = 0; cmd_in = '0; m_full = 0;
    repeat (2) @(negedge clk); rst_n = 1;

    // loop 0: r5 from 0 to 20
    for (int i = 0; i < 64; i++) mem[i] = $urandom;
    for (int i = 64; i < 128; i++) mem[i] = 0;
    r3 = 0; r8 = 256 - 4; r9 = 32'h1234_5678; r5 = 0; e = 0; r4 = 0; r10 = 0; r18 = 0;
    begin
      logic [31:0] m [128];
      for (int i = 0; i < 128; i++) m[i] = mem[i];
      forever begin
        r5n = r5 + 1; cmpv = 20 - r5n; cmpv[31] = $signed(r5n) > 20;
        if (cmpv[31]) break;
        r4 = m[r3 / 4]; r10 = r4 >> 3; t = r10 | r9; r9 = r4 << 5;
        r8 += 4; m[r8 / 4] = t; r3 += 4; r5 = r5n; r18 = cmpv; e++;
      end
      ops = '{256 - 4, 32'd5, 32'h1234_5678, 32'd3, 32'd0, 32'd20, 32'd0};
      go(0, ops);
      chk(resq.size() == 7, "loop 0 result count");
      if (resq.size() == 7)
        chk(resq[0] == r8 && resq[1] == r9 && resq[2] == r10 && resq[3] == r4 &&
            resq[4] == r3 && resq[5] == r18 && resq[6] == r5, "loop 0 results");
      for (int i = 64; i < 128; i++) chk(mem[i] == m[i], $sformatf("loop 0 mem %0d", i));
      chk(run_cycles == 3 * (e + 2), "loop 0 one iteration per 3 cycles");
      chk(exited, "loop 0 exited");
    end

    // loop 0 again, leaving in the first iteration: the outputs keep
    // their initial values and nothing is stored
    for (int i = 64; i < 128; i++) mem[i] = 32'hDEAD_BEEF;
    ops = '{256 - 4, 32'd5, 32'h1234_5678, 32'd3, 32'd0, 32'd2, 32'd5};
    go(0, ops);
    chk(resq.size() == 7, "loop 0 early exit result count");
    if (resq.size() == 7)
      chk(resq[0] == 252 && resq[1] == 32'h1234_5678 && resq[2] == 0 && resq[3] == 0 &&
          resq[4] == 0 && resq[5] == 0 && resq[6] == 5, "loop 0 early exit results");
    for (int i = 64; i < 128; i++) chk(mem[i] == 32'hDEAD_BEEF, "loop 0 early exit stores nothing");
    chk(run_cycles == 12, "loop 0 early exit length");

    // loop 1: inner product of 12 elements (11 on the accelerator)
    for (int i = 0; i < 24; i++) mem[512 + i] = rnd_f(126, 128);
    q = 32'h4000_0000; e = 0;
    for (int i = 0; i < 11; i++) begin
      q = d2s(s2d(q) + s2d(d2s(s2d(mem[512 + i]) * s2d(mem[512 + 12 + i]))));
      e++;
    end
    ops = '{32'd2048, 32'd2048 + 48, 32'd12, 32'h4000_0000};
    go(1, ops);
    chk(resq.size() == 4, "loop 1 result count");
    if (resq.size() == 4)
      chk(resq[0] == 2048 + 44 && resq[1] == 2048 + 48 + 44 && resq[2] == 1 && resq[3] == q,
          $sformatf("loop 1 results %h %h", resq[3], q));
    chk(run_cycles == 4 * (e + 3), "loop 1 one iteration per 4 cycles");
    // loop 2: scaled conversion, n = 1, 2, 3 and 25
    foreach (nl2[k]) begin
      int n;
      word_t x, pr, qq, d4, rv [$];
      n = nl2[k];
      rv.delete();
      for (int i = 0; i < 32; i++) begin
        mem[768 + i] = (i % 2) ? word_t'($urandom % 100000) : word_t'(-($urandom % 100000));
        mem[832 + i] = 32'hDEAD_BEEF;
      end
      e = 0; d4 = 3328 - 4;
      for (int i = 0; i < n - 1; i++) begin
        x  = mem[768 + i];
        pr = x * 32'd37;
        qq = word_t'($signed(pr) / 10);
        rv.push_back(d2s(real'($signed(qq))));
        e++;
      end
      ops = '{32'd3072, d4, word_t'(n), 32'd37};
      go(2, ops);
      chk(resq.size() == 3, "loop 2 result count");
      if (resq.size() == 3)
        chk(resq[0] == 3072 + 4 * e && resq[1] == d4 + 4 * e && resq[2] == word_t'(n - e),
            $sformatf("loop 2 results %h %h %h", resq[0], resq[1], resq[2]));
      for (int i = 0; i < 32; i++)
        chk(mem[832 + i] == ((i < e) ? rv[i] : 32'hDEAD_BEEF), $sformatf("loop 2 mem %0d: %h %h x=%h", i, mem[832 + i], (i < e) ? rv[i] : 0, mem[768 + i]));
      chk(run_cycles == ((e >= 3) ? 3 * (e + 3) : 18),
          $sformatf("loop 2 length %0d for %0d iterations", run_cycles, e));
    end
    // loop 3: division by a loop invariant on the 35-cycle divider
    foreach (nl3[k]) begin
      int n;
      word_t dv, ex3 [$];
      n = nl3[k]; dv = dl3[k];
      ex3.delete();
      for (int i = 0; i < 8; i++) begin
        mem[1024 + i] = $urandom;
        mem[1088 + i] = 32'hDEAD_BEEF;
      end
      e = 0;
      for (int i = 0; i < n - 1; i++) begin
        ex3.push_back((dv == 0) ? 32'd0 : word_t'($signed(mem[1024 + i]) / $signed(dv)));
        e++;
      end
      ops = '{32'd4096, 32'd4352 - 4, word_t'(n), dv};
      go(3, ops);
      chk(resq.size() == 3, "loop 3 result count");
      if (resq.size() == 3)
        chk(resq[0] == 4096 + 4 * e && resq[1] == 4352 - 4 + 4 * e && resq[2] == word_t'(n - e),
            "loop 3 results");
      for (int i = 0; i < 8; i++)
        chk(mem[1088 + i] == ((i < e) ? ex3[i] : 32'hDEAD_BEEF), $sformatf("loop 3 mem %0d", i));
      chk(run_cycles == ((e >= 2) ? 35 * (e + 2) : 140),
          $sformatf("loop 3 length %0d for %0d iterations", run_cycles, e));
    end
    // loop 4: the same on the 32-cycle fp divider
    foreach (nl4[k]) begin
      int n;
      word_t dv, ex4 [$];
      n = nl4[k]; dv = dl4[k];
      ex4.delete();
      for (int i = 0; i < 8; i++) begin
        mem[1152 + i] = rnd_f(100, 154);
        mem[1216 + i] = 32'hDEAD_BEEF;
      end
      e = 0;
      for (int i = 0; i < n - 1; i++) begin
        ex4.push_back(d2s(s2d(mem[1152 + i]) / s2d(dv)));
        e++;
      end
      ops = '{32'd4608, 32'd4864 - 4, word_t'(n), dv};
      go(4, ops);
      chk(resq.size() == 3, "loop 4 result count");
      if (resq.size() == 3)
        chk(resq[0] == 4608 + 4 * e && resq[1] == 4864 - 4 + 4 * e && resq[2] == word_t'(n - e),
            "loop 4 results");
      for (int i = 0; i < 8; i++)
        chk(mem[1216 + i] == ((i < e) ? ex4[i] : 32'hDEAD_BEEF),
            $sformatf("loop 4 mem %0d: %h %h", i, mem[1216 + i], (i < e) ? ex4[i] : 0));
      chk(run_cycles == ((e >= 2) ? 32 * (e + 2) : 128),
          $sformatf("loop 4 length %0d for %0d iterations", run_cycles, e));
    end
    chk(!fifo_overflow, "no FIFO overflow");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
