// tb_lpa_workloads: the inner-product kernel (single precision) run
// through the whole system at the data sizes used to evaluate the design,
// N = 1024 and N = 4096, plus the example integer loop over 1024 words.
//
// The testbench plays the host: it loads the arrays straight into the
// local memory (backdoor, to keep the run short), fetches the loop start,
// checks the injected branch, performs the communication routine over the
// FSL links, then executes the final loop iteration itself as the host
// would after the jump back.  The complete kernel result (q = 1.0 +
// sum z[k]*x[k], accumulated in order with single-precision rounding) is
// compared with a reference, and the accelerator's run time must be
// II*(E+S) cycles for E accelerated iterations, i.e. one iteration every
// 4 cycles for the inner product and every 3 for the integer loop.
// Default parameters throughout; the run takes a few seconds.
module tb_lpa_workloads;
  import lpa_pkg::*;
  import lpa_inst_pkg::*;
  `include "tb_lpa_fu_fp.svh"

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
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

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
  function automatic word_t rd(input word_t a);
    return dut.u_mem.mem[a[16:2]];
  endfunction

  localparam word_t MB1 = 32'h200, CR1 = 32'h1100, MB0 = 32'h100, CR0 = 32'h1000;
  localparam word_t ZA = 32'h4000, XA = 32'h8000;   // up to 4096 words each

  task automatic innerprod(input int n);
    word_t z [], x [], res [4], ins, q, qa;
    int e;
    z = new[n]; x = new[n];
    for (int i = 0; i < n; i++) begin
      z[i] = {1'($urandom), 8'd127, 23'($urandom)};
      x[i] = {1'($urandom), 8'd127, 23'($urandom)};
      dut.u_mem.mem[(ZA >> 2) + i] = z[i];
      dut.u_mem.mem[(XA >> 2) + i] = x[i];
    end
    // reference: the whole kernel, in order
    q = 32'h3F80_0000;
    for (int i = 0; i < n; i++) q = d2s(s2d(q) + s2d(d2s(s2d(z[i]) * s2d(x[i]))));
    // host reaches the loop: injected branch, routine, results
    fetch(MB1, ins);
    check(ins == (32'hB808_0000 | CR1), "inner product: branch injected");
    put(ZA); put(XA); put(word_t'(n)); put(32'h3F80_0000);
    for (int i = 0; i < 4; i++) get(res[i]);
    fetch(MB1, ins);
    check(ins == 32'h3000_0200, "inner product: return fetch passes");
    e = n - 1;
    check(res[0] == ZA + 4 * e && res[1] == XA + 4 * e && res[2] == 1,
          "inner product: pointers and counter handed back");
    // host runs the last iteration with the returned registers
    qa = d2s(s2d(res[3]) + s2d(d2s(s2d(rd(res[0])) * s2d(rd(res[1])))));
    check(qa == q, $sformatf("inner product N=%0d: %h, reference %h", n, qa, q));
    check(acc_run_cycles == 4 * (e + 3),
          $sformatf("inner product N=%0d: %0d cycles for %0d iterations", n, acc_run_cycles, e));
    check(!acc_fifo_overflow, "inner product: no FIFO overflow");
    $display("inner product N=%0d: %0d accelerated iterations in %0d cycles", n, e, acc_run_cycles);
  endtask

  task automatic example_loop(input int n);
    localparam word_t SRC = 32'h10000, DST = 32'h14000;
    word_t m [], res [7], ins, r9;
    int e;
    m = new[n];
    for (int i = 0; i < n; i++) begin
      m[i] = $urandom;
      dut.u_mem.mem[(SRC >> 2) + i] = m[i];
      dut.u_mem.mem[(DST >> 2) + i] = 32'hDEAD_BEEF;
    end
    dut.u_mem.mem[(DST >> 2) + n] = 32'hDEAD_BEEF;
    fetch(MB0, ins);
    check(ins == (32'hB808_0000 | CR0), "example loop: branch injected");
    // r8 = DST-4, r12 = 8, r9 = 0x5A, r6 = 4, r3 = SRC, r19 = n, r5 = 0
    put(DST - 4); put(32'd8); put(32'h5A); put(32'd4); put(SRC); put(word_t'(n)); put(32'd0);
    for (int i = 0; i < 7; i++) get(res[i]);
    fetch(MB0, ins);
    e = n;
    r9 = 32'h5A;
    for (int i = 0; i < n; i++) begin
      check(rd(DST + 4 * i) == ((m[i] >> 4) | r9), $sformatf("example loop: word %0d", i));
      r9 = m[i] << 8;
    end
    check(rd(DST + 4 * n) == 32'hDEAD_BEEF, "example loop: nothing stored past the end");
    check(res[0] == DST + 4 * (n - 1) && res[4] == SRC + 4 * n && res[6] == n,
          "example loop: registers handed back");
    check(acc_run_cycles == 3 * (e + 2),
          $sformatf("example loop: %0d cycles for %0d iterations", acc_run_cycles, e));
    $display("example loop n=%0d: %0d iterations in %0d cycles", n, e, acc_run_cycles);
  endtask

  initial begin
    inj_enable = 1; i_fetch = 0; i_addr = 0; d_en = 0; d_we = 0; d_addr = 0; d_wdata = 0;
    put_data = 0; put_write = 0; get_read = 0;
    dut.u_mem.mem[MB0 >> 2] = 32'h3000_0100;
    dut.u_mem.mem[MB1 >> 2] = 32'h3000_0200;
    repeat (3) @(negedge clk);
    rst_n = 1;
    innerprod(1024);
    innerprod(4096);
    example_loop(1024);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
