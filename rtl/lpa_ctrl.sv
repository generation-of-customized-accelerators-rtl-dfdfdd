// lpa_ctrl: controller of the loop accelerator.
//
// Phases: IDLE until a command word arrives from the injector; LOAD reads
// the number of operands the command names from the host link into the
// input registers; INIT flushes the output FIFOs and preloads the output
// registers; RUN steps through the configuration words of the commanded
// loop, one word per cycle; SEND returns the output registers over the
// host link; then IDLE again.  The memory ports belong to the accelerator
// only during RUN.
//
// Sequencing follows the design: words are read in order from the command's
// start address; the last steady-state word carries an address update that
// jumps back to the first steady-state word, and is ignored once an exit has
// been seen, so execution falls through into the epilog; the word marked
// done ends the run.
//
// Iteration bookkeeping is this implementation's own: iv holds one valid bit
// per pipeline stage.  At the first word of every group of II words the bits
// shift by one stage and a new iteration enters stage 0 unless an exit has
// been seen.  When an exit unit fires for an iteration in stage j, that
// iteration and all younger ones (stages j..0) are discarded.  Stores,
// output FIFO pushes, commits and exit evaluations are enabled only for live
// iterations; everything else (pool writes, pipelined FUs) runs on the
// static schedule regardless, which keeps the position of every value in
// the register pool fixed.
module lpa_ctrl
  import lpa_pkg::*;
  import lpa_inst_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  // command from the injector
  input  logic            cmd_valid,
  input  cmd_t            cmd_in,
  output logic            busy,
  output cmd_t            cmd,          // command being executed
  // operand link from the host
  input  logic            s_exists,
  output logic            s_read,
  output logic            in_clear,
  output logic            in_wr,
  input  logic [NINW-1:0] in_count,
  // result link to the host
  input  logic            m_full,
  output logic            m_write,
  output logic [NINW-1:0] out_idx,
  // output FIFOs
  output logic            out_start,
  // configuration memory
  output logic [CAW-1:0]  cfg_addr,
  input  cfg_word_t       word,
  // datapath control
  output logic            running,      // also: memory ports owned
  output logic [NSTG-1:0] iv_issue,     // live stages before this cycle's exits
  output logic [NSTG-1:0] iv_live,      // live stages after this cycle's exits
  input  logic [NFU-1:0]  exit_hit,     // exit units firing this cycle
  output logic            exited,       // the loop has exited (status)
  output logic [31:0]     run_cycles    // length of the last run
);
  typedef enum logic [2:0] {S_IDLE, S_LOAD, S_INIT, S_RUN, S_SEND} state_e;
  state_e          state;
  logic [CAW-1:0]  addr;
  logic [NSTG-1:0] iv_q;
  logic            exit_seen;
  logic [NSTG-1:0] kill;
  logic            exit_now;

  assign busy     = (state != S_IDLE);
  assign running  = (state == S_RUN);
  assign cfg_addr = addr;
  assign exited   = exit_seen;

  // live-stage bits for this word
  always_comb begin
    iv_issue = word.newpass ? {iv_q[NSTG-2:0], ~exit_seen} : iv_q;
    kill     = '0;
    for (int f = 0; f < NFU; f++)
      if (exit_hit[f])
        for (int j = 0; j < NSTG; j++)
          if (j <= int'(word.stg[f])) kill[j] = 1'b1;
    if (!running) kill = '0;
    exit_now = running && (exit_hit != '0);
    iv_live  = iv_issue & ~kill;
  end

  assign s_read    = (state == S_LOAD) && s_exists && (in_count < cmd.nin);
  assign in_wr     = s_read;
  assign in_clear  = (state == S_IDLE);
  assign out_start = (state == S_INIT);
  assign m_write   = (state == S_SEND) && !m_full && (out_idx < cmd.nout);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      cmd        <= '0;
      addr       <= '0;
      iv_q       <= '0;
      exit_seen  <= 1'b0;
      out_idx    <= '0;
      run_cycles <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (cmd_valid) begin
          cmd   <= cmd_in;
          state <= S_LOAD;
        end
        S_LOAD: if (in_count == cmd.nin) state <= S_INIT;
        S_INIT: begin
          addr       <= cmd.start;
          iv_q       <= '0;
          exit_seen  <= 1'b0;
          run_cycles <= '0;
          state      <= S_RUN;
        end
        S_RUN: begin
          run_cycles <= run_cycles + 1;
          iv_q       <= iv_live;
          if (exit_now) exit_seen <= 1'b1;
          if (word.done) begin
            out_idx <= '0;
            state   <= S_SEND;
          end else if (word.addr_upd != '0 && !exit_seen && !exit_now)
            addr <= addr - word.addr_upd;
          else
            addr <= addr + 1'b1;
        end
        S_SEND: begin
          if (m_write) out_idx <= out_idx + 1'b1;
          if (out_idx == cmd.nout) state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // The hot-bit multiplexer controls of every issued word are one-hot or zero.
  for (genvar f = 0; f < NFU; f++) begin : g_chk
    for (genvar k = 0; k < 2; k++) begin : g_op
      a_onehot: assert property (@(posedge clk) disable iff (!rst_n)
                                 running |-> $onehot0(word.sel[f][k]));
    end
  end
endmodule
