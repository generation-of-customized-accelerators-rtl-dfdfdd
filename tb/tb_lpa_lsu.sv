// tb_lpa_lsu: the load/store unit against a behavioural word memory with a
// one-cycle read: stores of every size set the right byte enables and
// lanes; loads of every size return aligned, zero-extended data in the
// cycle after issue (latency 2 into the register pool).
module tb_lpa_lsu;
  import lpa_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  logic start; ls_kind_e kind; word_t a, b;
  logic m_en; logic [3:0] m_we; word_t m_addr, m_wdata, m_rdata, y;
  logic [31:0] mem [64];
  lpa_lsu dut (.*);
  always_ff @(posedge clk) if (m_en) begin
    for (int i = 0; i < 4; i++) if (m_we[i]) mem[m_addr[7:2]][8*i +: 8] <= m_wdata[8*i +: 8];
    m_rdata <= mem[m_addr[7:2]];
  end
  initial begin
    repeat (20000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  logic [31:0] ref_mem [64];
  initial begin
    start = 0; kind = LS_LW; a = 0; b = 0;
    for (int i = 0; i < 64; i++) begin mem[i] = $urandom; ref_mem[i] = mem[i]; end
    for (int n = 0; n < 600; n++) begin
      word_t exp;
      int w, off;
      @(negedge clk);
      kind  = ls_kind_e'($urandom % 6);
      w     = $urandom % 64;
      off   = (kind == LS_LW || kind == LS_SW) ? 0 :
              (kind == LS_LHU || kind == LS_SH) ? 2 * ($urandom % 2) : $urandom % 4;
      a     = word_t'(4 * w + off);
      b     = $urandom;
      start = 1;
      case (kind)
        LS_SW: ref_mem[w] = b;
        LS_SH: ref_mem[w][31 - 8*off -: 16] = b[15:0];
        LS_SB: ref_mem[w][31 - 8*off -: 8] = b[7:0];
        default: ;
      endcase
      exp = (kind == LS_LW) ? ref_mem[w] :
            (kind == LS_LHU) ? {16'd0, ref_mem[w][31 - 8*off -: 16]} :
            {24'd0, ref_mem[w][31 - 8*off -: 8]};
      @(negedge clk);
      start = 0;
      if (kind inside {LS_LW, LS_LHU, LS_LBU}) begin
        checks++;
        if (y !== exp) begin failures++; $display("FAIL load %0d @%h got %h exp %h", kind, a, y, exp); end
      end
    end
    for (int i = 0; i < 64; i++) begin
      checks++;
      if (mem[i] !== ref_mem[i]) begin failures++; $display("FAIL mem %0d", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
