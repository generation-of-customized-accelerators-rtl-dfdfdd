// lpa_accel: customized, modulo-scheduled loop accelerator.
//
// The datapath is a row of single-operation functional units.  Each unit
// input has a multiplexer wired only to the input registers, pool
// registers and constants the schedule needs, driven by hot-bit select
// fields of the configuration word.  Each unit drives its own chain in the
// register pool; the word's write enables move values down the chains.
// Two load/store units give two memory ports.  Live-out values go through
// an output FIFO into the output registers, one per host register returned.
// The instance (units, chains, wiring, words) comes from lpa_inst_pkg.
//
// Interface: a command word from the injector (cmd_valid/cmd); an FSL input
// channel carrying the operands; an FSL output channel carrying the
// results; two memory ports (byte addresses, big-endian byte enables, read
// data one cycle after the request) valid while mem_own is high.
// Timing: one configuration word per cycle; a unit with latency L issued in
// cycle t has its result written into its chain at the end of cycle t+L-1.
// Follows the design's template: the unit row, per-unit register chains with
// individual write enables, hot-bit multiplexers, two memory ports, output
// FIFOs, a command word that picks the loop.  This design's own choices:
// the stage tag on each side effect and the per-stage valid bits that
// cancel the stores, pushes and completions of an iteration discarded by an
// exit; initial output values copied from input registers; the order in
// which operands and results travel over the links.
module lpa_accel
  import lpa_pkg::*;
  import lpa_inst_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        cmd_valid,
  input  cmd_t        cmd_in,
  // operands from the host (FSL read side)
  input  word_t       s_data,
  input  logic        s_exists,
  output logic        s_read,
  // results to the host (FSL write side)
  output word_t       m_data,
  output logic        m_write,
  input  logic        m_full,
  // memory ports
  output logic        mem_own,
  output logic [1:0]  p_en,
  output logic [1:0][3:0] p_we,
  output word_t       p_addr  [2],
  output word_t       p_wdata [2],
  input  word_t       p_rdata [2],
  // status
  output logic        busy,
  output logic        exited,
  output logic        fifo_overflow,
  output logic [31:0] run_cycles
);
  cmd_t            cmd;
  cfg_word_t       word;
  logic [CAW-1:0]  cfg_addr;
  logic            running, in_clear, in_wr, out_start;
  logic [NINW-1:0] in_count, out_idx;
  logic [NSTG-1:0] iv_issue, iv_live;
  logic [NFU-1:0]  exit_hit;

  word_t in_q   [NIN];
  word_t pool   [NPOOL];
  word_t src    [NSRC];
  word_t opnd   [NFU][2];
  word_t fu_res [NFU];
  word_t out_q  [NOUT];
  logic [NOUT-1:0] ovf;

  lpa_ctrl u_ctrl (
    .clk, .rst_n, .cmd_valid, .cmd_in, .busy, .cmd,
    .s_exists, .s_read, .in_clear, .in_wr, .in_count,
    .m_full, .m_write, .out_idx, .out_start,
    .cfg_addr, .word, .running, .iv_issue, .iv_live, .exit_hit,
    .exited, .run_cycles);

  lpa_cfg_mem u_cfg (.addr(cfg_addr), .word);

  lpa_in_regs #(.N(NIN)) u_in (
    .clk, .rst_n, .clear(in_clear), .wr(in_wr), .wdata(s_data), .q(in_q), .count(in_count));

  assign mem_own = running;

  // source vector seen by the multiplexers
  always_comb begin
    for (int i = 0; i < NIN; i++)    src[i] = in_q[i];
    for (int i = 0; i < NPOOL; i++)  src[NIN + i] = pool[i];
    for (int i = 0; i < NCONST; i++) src[NIN + NPOOL + i] = CONSTS[i];
  end

  for (genvar f = 0; f < NFU; f++) begin : g_fu
    // enable of an issue that has side effects: only for live iterations
    logic start_live, start_any;
    assign start_any  = running && word.en[f] && iv_issue[word.stg[f]];
    assign start_live = running && word.en[f] && iv_live[word.stg[f]];

    for (genvar k = 0; k < 2; k++) begin : g_in
      localparam int NW = src_count(f, k);
      if (NW == 0) begin : g_none
        assign opnd[f][k] = '0;
      end else if (NW == 1) begin : g_wire
        // a single source needs no multiplexer
        assign opnd[f][k] = src[SRC[f][k][0]];
      end else begin : g_mux
        word_t d [NW];
        for (genvar p = 0; p < NW; p++) begin : g_d
          assign d[p] = src[SRC[f][k][p]];
        end
        lpa_in_mux #(.N(NW)) u_mux (.d, .sel(word.sel[f][k][NW-1:0]), .y(opnd[f][k]));
      end
    end

    if (FU_KIND[f] == FU_LSU) begin : g_lsu
      localparam int P = (f == U_LS0) ? 0 : 1;
      lpa_lsu u_lsu (
        .clk, .start(start_live), .kind(ls_kind_e'(word.fn[f])),
        .a(opnd[f][0]), .b(opnd[f][1]),
        .m_en(p_en[P]), .m_we(p_we[P]), .m_addr(p_addr[P]), .m_wdata(p_wdata[P]),
        .m_rdata(p_rdata[P]), .y(fu_res[f]));
      assign exit_hit[f] = 1'b0;
    end else if (FU_KIND[f] == FU_INT) begin : g_int
      lpa_fu_int #(.OP(FU_INTOP[f])) u_int (.a(opnd[f][0]), .b(opnd[f][1]), .y(fu_res[f]));
      assign exit_hit[f] = 1'b0;
    end else if (FU_KIND[f] == FU_EXIT) begin : g_exit
      lpa_fu_exit #(.COND(FU_BRCOND[f]), .LOOP_ON_TAKEN(1'b1)) u_exit (
        .start(start_any), .a(opnd[f][0]), .exit_o(exit_hit[f]));
      assign fu_res[f] = '0;
    end else if (FU_KIND[f] == FU_FADD) begin : g_fadd
      lpa_fu_fadd u_fadd (.clk, .sub(word.fn[f][0]), .a(opnd[f][0]), .b(opnd[f][1]), .y(fu_res[f]));
      assign exit_hit[f] = 1'b0;
    end else if (FU_KIND[f] == FU_FMUL) begin : g_fmul
      lpa_fu_fmul u_fmul (.clk, .a(opnd[f][0]), .b(opnd[f][1]), .y(fu_res[f]));
      assign exit_hit[f] = 1'b0;
    end else if (FU_KIND[f] == FU_IMUL) begin : g_imul
      lpa_fu_imul u_imul (.a(opnd[f][0]), .b(opnd[f][1]), .y(fu_res[f]));
      assign exit_hit[f] = 1'b0;
    end else if (FU_KIND[f] == FU_CDIV) begin : g_cdiv
      lpa_fu_cdiv #(.DIVISOR(FU_DIVISOR[f])) u_cdiv (.clk, .x(opnd[f][0]), .y(fu_res[f]));
      assign exit_hit[f] = 1'b0;
    end else if (FU_KIND[f] == FU_FCONV) begin : g_fconv
      lpa_fu_fconv u_fconv (.fn(word.fn[f][0]), .a(opnd[f][0]), .y(fu_res[f]));
      assign exit_hit[f] = 1'b0;
    end else if (FU_KIND[f] == FU_IDIV) begin : g_idiv
      logic fu_busy;
      lpa_fu_idiv u_idiv (.clk, .rst_n, .start(start_any), .uns(word.fn[f][0]),
                          .a(opnd[f][0]), .b(opnd[f][1]), .y(fu_res[f]), .busy(fu_busy));
      assign exit_hit[f] = 1'b0;
    end else if (FU_KIND[f] == FU_FDIV) begin : g_fdiv
      logic fu_busy;
      lpa_fu_fdiv u_fdiv (.clk, .rst_n, .start(start_any),
                          .a(opnd[f][0]), .b(opnd[f][1]), .y(fu_res[f]), .busy(fu_busy));
      assign exit_hit[f] = 1'b0;
    end else begin : g_unknown
      assign fu_res[f]   = '0;
      assign exit_hit[f] = 1'b0;
    end

    if (CH_LEN[f] > 0) begin : g_chain
      word_t q [CH_LEN[f]];
      lpa_reg_chain #(.LEN(CH_LEN[f])) u_chain (
        .clk, .d(fu_res[f]), .we(word.we[CH_BASE[f] +: CH_LEN[f]] & {CH_LEN[f]{running}}), .q);
      for (genvar r = 0; r < CH_LEN[f]; r++) begin : g_q
        assign pool[CH_BASE[f] + r] = q[r];
      end
    end
  end

  // output FIFOs and registers
  for (genvar o = 0; o < NOUT; o++) begin : g_out
    word_t init;
    assign init = (int'(cmd.out_init[o]) < NIN) ? in_q[cmd.out_init[o][$clog2(NIN)-1:0]] : '0;
    lpa_out_fifo #(.DEPTH(OFIFO_DEPTH)) u_of (
      .clk, .rst_n, .start(out_start), .init,
      .push(running && word.push[o] && iv_live[word.push_stg[o]]),
      .din(fu_res[cmd.out_fu[o]]),
      .commit(running && word.commit && iv_live[word.commit_stg]),
      .q(out_q[o]), .overflow(ovf[o]));
  end

  assign m_data        = out_q[out_idx[$clog2(NOUT)-1:0]];
  assign fifo_overflow = |ovf;
endmodule
