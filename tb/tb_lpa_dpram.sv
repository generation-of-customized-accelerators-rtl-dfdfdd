// tb_lpa_dpram: random reads and byte-enabled writes on both ports of a
// small instance, compared with a model; read data one cycle after the
// request.
module tb_lpa_dpram;
  import lpa_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  logic a_en, b_en; logic [3:0] a_we, b_we;
  word_t a_addr, a_wdata, a_rdata, b_addr, b_wdata, b_rdata;
  lpa_dpram #(.WORDS(256)) dut (.*);
  logic [31:0] m [256];
  initial begin
    repeat (20000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    a_en = 0; b_en = 0; a_we = 0; b_we = 0;
    for (int i = 0; i < 256; i++) begin
      @(negedge clk); a_en = 1; a_we = 4'hF; a_addr = 4 * i; a_wdata = i * 32'h01010101; m[i] = a_wdata;
    end
    for (int n = 0; n < 2000; n++) begin
      word_t ea, eb;
      int ia, ib;
      @(negedge clk);
      ia = $urandom % 256; ib = $urandom % 256;
      if (ia == ib) ib = (ib + 1) % 256;      // no same-word collisions
      a_en = 1; a_we = 4'($urandom); a_addr = 4 * ia; a_wdata = $urandom;
      b_en = 1; b_we = ($urandom % 2) ? 4'($urandom) : 4'h0; b_addr = 4 * ib; b_wdata = $urandom;
      ea = m[ia]; eb = m[ib];
      for (int k = 0; k < 4; k++) begin
        if (a_we[k]) m[ia][8*k +: 8] = a_wdata[8*k +: 8];
        if (b_we[k]) m[ib][8*k +: 8] = b_wdata[8*k +: 8];
      end
      @(negedge clk);
      a_en = 0; b_en = 0;
      checks += 2;
      if (a_rdata !== ea) begin failures++; $display("FAIL A %0d", ia); end
      if (b_rdata !== eb) begin failures++; $display("FAIL B %0d", ib); end
    end
    for (int i = 0; i < 256; i++) begin
      @(negedge clk); b_en = 1; b_we = 0; b_addr = 4 * i;
      @(negedge clk); b_en = 0;
      checks++;
      if (b_rdata !== m[i]) begin failures++; $display("FAIL final %0d", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
