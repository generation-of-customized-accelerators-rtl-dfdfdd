// tb_lpa_system: end-to-end test of the accelerated system.
//
// The testbench plays the host processor: it fills memory over the data
// bus, fetches the start address of each accelerated loop and checks that
// the injector returns the branch to the communication routine, then acts
// as that routine (operands over the put link, blocking get of the results)
// and checks results, memory and run time against a model of the loop.
// Runs: loop 0 (integer, II 3) with several trip counts including an exit
// in the first iteration; loop 1 (single-precision inner product, II 4);
// loop 2 (multiply, division by a constant, integer-to-float, II 3);
// loop 3 (35-cycle integer divider, II 35, other units keep issuing);
// loop 4 (32-cycle fp divider, II 32);
// a fetch with the injector disabled; the return fetch that must pass.
// The run time of a loop that exits after E completed iterations is
// II*(E+S) cycles (S stages), i.e. one new iteration every II cycles.
// Everything runs at the design's default sizes.
module tb_lpa_system;
  import lpa_pkg::*;
  import lpa_inst_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic inj_enable;
  logic i_fetch; word_t i_addr, i_rdata;
  logic d_en; logic [3:0] d_we; word_t d_addr, d_wdata, d_rdata;
  word_t put_data; logic put_write, put_full;
  word_t get_data; logic get_exists, get_read;
  logic acc_busy, acc_mem_own, acc_exited, acc_fifo_overflow;
  logic [31:0] acc_run_cycles;

  lpa_system dut (.*);

  int checks = 0, failures = 0;
  int n_inject = 0, n_pass_return = 0, n_disabled = 0, n_exit_prolog = 0,
      n_exit_steady = 0, n_loopback = 0, n_discard_store = 0, n_bypass = 0,
      n_mem_handover = 0, n_fp = 0, n_conv = 0, n_div_overlap = 0,
      n_fdiv_overlap = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---- watchdog
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- mechanism counters observed inside the design
  always @(posedge clk) if (rst_n) begin
    if (dut.u_acc.u_ctrl.running && dut.u_acc.word.addr_upd != 0
        && !dut.u_acc.u_ctrl.exit_seen && !dut.u_acc.u_ctrl.exit_now) n_loopback++;
    if (dut.u_acc.g_out[3].u_of.bypass && dut.u_acc.g_out[3].u_of.commit) n_bypass++;
    if (dut.u_acc.u_ctrl.running && dut.u_acc.word.en[U_LS0]
        && dut.u_acc.word.fn[U_LS0] == 3'(LS_SW) && !dut.u_acc.g_fu[U_LS0].start_live)
      n_discard_store++;
    if (dut.u_acc.g_fu[U_IDIV].g_idiv.u_idiv.busy && dut.u_acc.u_ctrl.running
        && (dut.u_acc.word.en & ~(NFU'(1) << U_IDIV)) != '0)
      n_div_overlap++;
    if (dut.u_acc.g_fu[U_FDIV].g_fdiv.u_fdiv.busy && dut.u_acc.u_ctrl.running
        && (dut.u_acc.word.en & ~(NFU'(1) << U_FDIV)) != '0)
      n_fdiv_overlap++;
  end
  logic own_q = 0;
  always @(posedge clk) begin
    own_q <= acc_mem_own;
    if (acc_mem_own && !own_q) n_mem_handover++;
  end

  // ---- host bus tasks (drive on the falling edge)
  task automatic mem_write(input word_t a, input word_t v);
    @(negedge clk); d_en = 1; d_we = 4'hF; d_addr = a; d_wdata = v;
    @(negedge clk); d_en = 0; d_we = 0;
  endtask
  task automatic mem_read(input word_t a, output word_t v);
    @(negedge clk); d_en = 1; d_we = 0; d_addr = a;
    @(negedge clk); d_en = 0; v = d_rdata;
  endtask
  task automatic fetch(input word_t a, output word_t v);
    @(negedge clk); i_fetch = 1; i_addr = a;
    @(negedge clk); i_fetch = 0; v = i_rdata;
  endtask
  task automatic put(input word_t v);
    @(negedge clk); while (put_full) @(negedge clk);
    put_data = v; put_write = 1;
    @(negedge clk); put_write = 0;
  endtask
  task automatic get(output word_t v);
    @(negedge clk); while (!get_exists) @(negedge clk);
    v = get_data; get_read = 1;
    @(negedge clk); get_read = 0;
  endtask

  localparam word_t MB0 = 32'h100, MB1 = 32'h200, CR0 = 32'h1000, CR1 = 32'h1100;
  localparam word_t MB [5] = '{32'h100, 32'h200, 32'h300, 32'h400, 32'h500};
  localparam word_t CR [5] = '{32'h1000, 32'h1100, 32'h1200, 32'h1300, 32'h1400};
  localparam word_t SRC3 = 32'hE000, DST3 = 32'hE800;
  localparam word_t SRC4 = 32'hF000, DST4 = 32'hF800;
  localparam word_t SRC2 = 32'hC000, DST2 = 32'hD000;
  localparam word_t SRC0 = 32'h4000, DST0 = 32'h6000, ZA = 32'h8000, XA = 32'hA000;
  localparam word_t GUARD = 32'hDEAD_BEEF;

  // invoke the accelerator the way the injector and the routine do
  task automatic invoke(input int l, input word_t ops [], output word_t res []);
    word_t ins;
    fetch(MB[l], ins);
    check(ins == (32'hB808_0000 | CR[l]), "injected branch");
    if (ins == (32'hB808_0000 | CR[l])) n_inject++;
    foreach (ops[i]) put(ops[i]);
    res = new[LOOP_NOUT[l]];
    foreach (res[i]) get(res[i]);
    // the routine jumps back to the loop start: that fetch must pass
    fetch(MB[l], ins);
    check(ins == (32'h3000_0000 | MB[l]), "return fetch passes");
    if (ins == (32'h3000_0000 | MB[l])) n_pass_return++;
  endtask

  // ---- loop 0: model and run
  task automatic run_loop0(input int n, input word_t r5_0, input word_t r19);
    word_t m [int];
    word_t r3, r5, r8, r9, r4, r10, r18, r12, r6, t, r5n, cmpv;
    word_t ops [], res [], v;
    int e = 0;
    r3 = SRC0; r8 = DST0 - 4; r9 = 32'h0000_00A5; r12 = 8; r6 = 4;
    r5 = r5_0; r4 = 0; r10 = 0; r18 = 0;
    for (int i = 0; i < 48; i++) begin
      m[SRC0 + 4*i] = $urandom;
      mem_write(SRC0 + 4*i, m[SRC0 + 4*i]);
      mem_write(DST0 + 4*i, GUARD);
    end
    // reference
    forever begin
      word_t r4n;
      r5n  = r5 + 1;
      cmpv = r19 - r5n;
      cmpv[31] = ($signed(r5n) > $signed(r19));
      if (cmpv[31]) break;               // exit: iteration discarded
      r4n = m[r3];
      r10 = r4n >> r6[4:0];
      t   = r10 | r9;
      r9  = r4n << r12[4:0];
      r8  = r8 + 4;
      m[r8] = t;
      r3 = r3 + 4; r5 = r5n; r4 = r4n; r18 = cmpv;
      e++;
    end
    ops = new[7];
    ops = '{DST0 - 4, 32'd8, 32'h0000_00A5, 32'd4, SRC0, r19, r5_0};
    invoke(0, ops, res);
    check(res[0] == r8,  $sformatf("loop0 r8 %h/%h", res[0], r8));
    check(res[1] == r9,  $sformatf("loop0 r9 %h/%h", res[1], r9));
    check(res[2] == r10, $sformatf("loop0 r10 %h/%h", res[2], r10));
    check(res[3] == r4,  $sformatf("loop0 r4 %h/%h", res[3], r4));
    check(res[4] == r3,  $sformatf("loop0 r3 %h/%h", res[4], r3));
    check(res[5] == r18, $sformatf("loop0 r18 %h/%h", res[5], r18));
    check(res[6] == r5,  $sformatf("loop0 r5 %h/%h", res[6], r5));
    for (int i = 0; i < 48; i++) begin
      mem_read(DST0 + 4*i, v);
      check(v == (m.exists(DST0 + 4*i) ? m[DST0 + 4*i] : GUARD),
            $sformatf("loop0 mem[%0d] %h", i, v));
    end
    check(acc_run_cycles == 3 * ((e >= 2) ? e + 2 : 4),
          $sformatf("loop0 cycles %0d for %0d iterations", acc_run_cycles, e));
    if (e < 2) n_exit_prolog++; else n_exit_steady++;
    check(!acc_fifo_overflow, "no output FIFO overflow");
    $display("loop0: %0d iterations in %0d cycles", e, acc_run_cycles);
  endtask

  // ---- loop 1: model and run
  function automatic word_t f_rand();   // value in [1,2) or (-2,-1], random fraction
    return {1'($urandom), 8'd127, 23'($urandom)};
  endfunction
  // Reference arithmetic in double precision: single -> double is exact
  // for normal numbers, and a product or a sum of two singles of similar
  // magnitude is exact in double, so one rounding back to single (nearest
  // even) gives the correctly rounded single-precision result.  A quotient
  // rounded to double and then to single is also correctly rounded.
  function automatic real s2d(word_t a);
    logic [63:0] d;
    d = {a[31], 11'(a[30:23]) - 11'd127 + 11'd1023, a[22:0], 29'd0};
    return $bitstoreal(d);
  endfunction
  function automatic word_t d2s(real r);
    logic [63:0] d;
    logic [24:0] m;
    logic [10:0] e;
    d = $realtobits(r);
    e = d[62:52];
    m = {2'b01, d[51:29]} + 25'(d[28] & ((|d[27:0]) | d[29]));
    if (m[24]) begin m = m >> 1; e = e + 1; end
    return {d[63], 8'(e - 11'd1023 + 11'd127), m[22:0]};
  endfunction
  function automatic word_t f_mul(word_t a, word_t b);
    return d2s(s2d(a) * s2d(b));
  endfunction
  function automatic word_t f_add(word_t a, word_t b);
    return d2s(s2d(a) + s2d(b));
  endfunction

  task automatic run_loop1(input int n);
    word_t z [], x [], ops [], res [];
    word_t q, r5, r6, r7;
    int e;
    z = new[n]; x = new[n];
    for (int i = 0; i < n; i++) begin
      z[i] = f_rand(); x[i] = f_rand();
      mem_write(ZA + 4*i, z[i]);
      mem_write(XA + 4*i, x[i]);
    end
    q = 32'h3F80_0000;  // 1.0
    r5 = ZA; r6 = XA; r7 = n;
    e = 0;
    forever begin
      if (r7 - 1 == 0) break;
      q  = f_add(q, f_mul(z[e], x[e]));
      r5 += 4; r6 += 4; r7 -= 1;
      e++;
    end
    ops = new[4];
    ops = '{ZA, XA, word_t'(n), 32'h3F80_0000};
    invoke(1, ops, res);
    check(res[0] == r5, $sformatf("loop1 r5 %h/%h", res[0], r5));
    check(res[1] == r6, $sformatf("loop1 r6 %h/%h", res[1], r6));
    check(res[2] == r7, $sformatf("loop1 r7 %h/%h", res[2], r7));
    check(res[3] == q,  $sformatf("loop1 q %h/%h", res[3], q));
    check(acc_run_cycles == 4 * ((e >= 3) ? e + 3 : 6),
          $sformatf("loop1 cycles %0d for %0d iterations", acc_run_cycles, e));
    n_fp++;
    if (e < 3) n_exit_prolog++; else n_exit_steady++;
    $display("loop1: %0d iterations in %0d cycles", e, acc_run_cycles);
  endtask

  // ---- loop 2: scaled integer-to-float conversion (multiply, constant
  // division, conversion); model and run
  task automatic run_loop2(input int n, input word_t scale);
    word_t m [int];
    word_t ops [], res [], v, x, r3, r4, r5;
    int e;
    for (int i = 0; i < n + 2; i++) begin
      x = (i % 3 == 0) ? word_t'(-($urandom % 50000)) : word_t'($urandom % 50000);
      mem_write(SRC2 + 4*i, x);
      mem_write(DST2 + 4*i, GUARD);
      m[i] = x;
    end
    r3 = SRC2; r4 = DST2 - 4; r5 = n; e = 0;
    ops = new[4];
    ops = '{SRC2, DST2 - 4, word_t'(n), scale};
    invoke(2, ops, res);
    forever begin
      if (r5 - 1 == 0) break;
      r3 += 4; r4 += 4; r5 -= 1; e++;
    end
    check(res[0] == r3, $sformatf("loop2 r3 %h/%h", res[0], r3));
    check(res[1] == r4, $sformatf("loop2 r4 %h/%h", res[1], r4));
    check(res[2] == r5, $sformatf("loop2 r5 %h/%h", res[2], r5));
    for (int i = 0; i < n + 2; i++) begin
      mem_read(DST2 + 4*i, v);
      x = (i < e) ? d2s(real'($signed(word_t'($signed(m[i] * scale) / 10)))) : GUARD;
      check(v == x, $sformatf("loop2 mem[%0d] %h/%h", i, v, x));
    end
    check(acc_run_cycles == 3 * ((e >= 3) ? e + 3 : 6),
          $sformatf("loop2 cycles %0d for %0d iterations", acc_run_cycles, e));
    n_conv++;
    if (e < 3) n_exit_prolog++; else n_exit_steady++;
    $display("loop2: %0d iterations in %0d cycles", e, acc_run_cycles);
  endtask

  // ---- loop 3: division by a loop invariant on the non-pipelined divider
  task automatic run_loop3(input int n, input word_t dv);
    word_t m [int];
    word_t ops [], res [], v, x;
    int e;
    for (int i = 0; i < n + 1; i++) begin
      x = $urandom;
      mem_write(SRC3 + 4*i, x);
      mem_write(DST3 + 4*i, GUARD);
      m[i] = x;
    end
    e = n - 1;
    ops = new[4];
    ops = '{SRC3, DST3 - 4, word_t'(n), dv};
    invoke(3, ops, res);
    check(res[0] == SRC3 + 4 * e && res[1] == DST3 - 4 + 4 * e && res[2] == 1, "loop3 registers");
    for (int i = 0; i < n + 1; i++) begin
      mem_read(DST3 + 4*i, v);
      x = (i >= e) ? GUARD : (dv == 0) ? 32'd0 : word_t'($signed(m[i]) / $signed(dv));
      check(v == x, $sformatf("loop3 mem[%0d] %h/%h", i, v, x));
    end
    check(acc_run_cycles == 35 * ((e >= 2) ? e + 2 : 4),
          $sformatf("loop3 cycles %0d for %0d iterations", acc_run_cycles, e));
    if (e < 2) n_exit_prolog++; else n_exit_steady++;
    $display("loop3: %0d iterations in %0d cycles", e, acc_run_cycles);
  endtask

  // ---- loop 4: the same on the non-pipelined fp divider
  task automatic run_loop4(input int n, input word_t dv);
    word_t m [int];
    word_t ops [], res [], v, x;
    int e;
    for (int i = 0; i < n + 1; i++) begin
      x = {1'($urandom), 8'(100 + $urandom % 55), 23'($urandom)};   // normal, no overflow
      mem_write(SRC4 + 4*i, x);
      mem_write(DST4 + 4*i, GUARD);
      m[i] = x;
    end
    e = n - 1;
    ops = new[4];
    ops = '{SRC4, DST4 - 4, word_t'(n), dv};
    invoke(4, ops, res);
    check(res[0] == SRC4 + 4 * e && res[1] == DST4 - 4 + 4 * e && res[2] == 1, "loop4 registers");
    for (int i = 0; i < n + 1; i++) begin
      mem_read(DST4 + 4*i, v);
      x = (i >= e) ? GUARD : d2s(s2d(m[i]) / s2d(dv));
      check(v == x, $sformatf("loop4 mem[%0d] %h/%h", i, v, x));
    end
    check(acc_run_cycles == 32 * ((e >= 2) ? e + 2 : 4),
          $sformatf("loop4 cycles %0d for %0d iterations", acc_run_cycles, e));
    if (e < 2) n_exit_prolog++; else n_exit_steady++;
    $display("loop4: %0d iterations in %0d cycles", e, acc_run_cycles);
  endtask

  initial begin
    word_t v;
    inj_enable = 1; i_fetch = 0; i_addr = 0; d_en = 0; d_we = 0; d_addr = 0; d_wdata = 0;
    put_data = 0; put_write = 0; get_read = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    mem_write(MB0, 32'h3000_0100);   // placeholder instructions at the loop starts
    mem_write(MB1, 32'h3000_0200);
    mem_write(MB[2], 32'h3000_0300);
    mem_write(MB[3], 32'h3000_0400);
    mem_write(MB[4], 32'h3000_0500);

    // injector disabled: the loop start is fetched unchanged, no command
    inj_enable = 0;
    fetch(MB0, v);
    check(v == 32'h3000_0100 && !acc_busy, "disabled injector is transparent");
    if (v == 32'h3000_0100) n_disabled++;
    inj_enable = 1;

    run_loop0(0, 32'd5, 32'd3);     // exits in the first iteration
    run_loop0(1, 32'd0, 32'd1);     // one iteration
    run_loop0(2, 32'd0, 32'd9);     // nine iterations
    run_loop0(3, 32'd10, 32'd40);   // thirty iterations
    run_loop1(2);                   // one iteration (exit in the prolog)
    run_loop1(17);                  // sixteen iterations
    run_loop2(1, 32'd7);            // exits in the first iteration
    run_loop2(40, 32'd1234);        // thirty-nine iterations
    run_loop3(9, 32'hFFFF_FFF9);    // eight divisions by -7
    run_loop3(2, 32'd0);            // one division, by zero
    run_loop4(7, 32'h4110_0000);    // six fp divisions by 9.0
    run_loop4(2, 32'hC0A0_0000);    // one fp division by -5.0

    check(n_inject > 0, "injection happened");
    check(n_pass_return > 0, "return fetch passed");
    check(n_disabled > 0, "disabled injector seen");
    check(n_exit_prolog > 0, "exit in the prolog happened");
    check(n_exit_steady > 0, "exit in the steady state happened");
    check(n_loopback > 0, "steady-state address update taken");
    check(n_discard_store > 0, "store of a discarded iteration suppressed");
    check(n_bypass > 0, "output FIFO bypass at commit happened");
    check(n_mem_handover > 0, "memory handed to the accelerator");
    check(n_fp > 0, "floating-point loop ran");
    check(n_conv > 0, "multiply/divide/convert loop ran");
    check(n_div_overlap > 0, "words issued while the divider was busy");
    check(n_fdiv_overlap > 0, "words issued while the fp divider was busy");
    $display("mechanisms: inject=%0d return=%0d disabled=%0d exit_prolog=%0d exit_steady=%0d loopback=%0d discard_store=%0d bypass=%0d handover=%0d fp=%0d conv=%0d div_overlap=%0d fdiv_overlap=%0d",
             n_inject, n_pass_return, n_disabled, n_exit_prolog, n_exit_steady, n_loopback,
             n_discard_store, n_bypass, n_mem_handover, n_fp, n_conv, n_div_overlap, n_fdiv_overlap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
