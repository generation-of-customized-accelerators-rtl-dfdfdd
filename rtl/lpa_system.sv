// lpa_system: host-coupled loop accelerator system.
//
// The host processor (a MicroBlaze in the reference system, not part of
// this RTL) connects through its ports: instruction bus, data bus and the
// two fast simplex link (FSL) channels.  Code, data and communication
// routines sit in one dual-port local memory.  Port A serves the host data
// bus, port B the host instruction bus through the injector; a bus
// multiplexer in front of each port hands it to one of the accelerator's
// two load/store ports while the accelerator runs a loop.
//
// Flow: the injector sees the host fetch the start of an accelerated loop,
// substitutes a branch to the loop's communication routine and sends the
// loop's command word to the accelerator.  The routine puts the operands on
// the FSL; the accelerator takes the memory, runs the loop until an exit,
// releases the memory and puts its output registers on the return FSL,
// where the host's blocking get has been waiting.
//
// Memory timing: requests are taken on a clock edge, read data follow one
// cycle later; byte enables are big-endian (bit 3 = bits 31:24).
module lpa_system
  import lpa_pkg::*;
  import lpa_inst_pkg::*;
#(
  parameter int unsigned MEM_WORDS = 32768,
  parameter int unsigned FSL_DEPTH = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        inj_enable,
  // host instruction bus
  input  logic        i_fetch,
  input  word_t       i_addr,
  output word_t       i_rdata,
  // host data bus
  input  logic        d_en,
  input  logic [3:0]  d_we,
  input  word_t       d_addr,
  input  word_t       d_wdata,
  output word_t       d_rdata,
  // host FSL put (host -> accelerator)
  input  word_t       put_data,
  input  logic        put_write,
  output logic        put_full,
  // host FSL get (accelerator -> host)
  output word_t       get_data,
  output logic        get_exists,
  input  logic        get_read,
  // accelerator status
  output logic        acc_busy,
  output logic        acc_mem_own,
  output logic        acc_exited,
  output logic        acc_fifo_overflow,
  output logic [31:0] acc_run_cycles
);
  logic cmd_valid;
  cmd_t cmd;
  word_t s_data, m_data;
  logic  s_exists, s_read, m_write, m_full;
  logic [1:0] p_en;
  logic [1:0][3:0] p_we;
  word_t p_addr [2], p_wdata [2], p_rdata [2];
  logic       a_en, b_en;
  logic [3:0] a_we, b_we;
  word_t      a_addr, b_addr, a_wdata, b_wdata, a_rdata, b_rdata;

  lpa_fsl_fifo #(.DEPTH(FSL_DEPTH)) u_fsl_to_acc (
    .clk, .rst_n, .wr_data(put_data), .wr(put_write), .full(put_full),
    .rd_data(s_data), .exists(s_exists), .rd(s_read));

  lpa_fsl_fifo #(.DEPTH(FSL_DEPTH)) u_fsl_to_host (
    .clk, .rst_n, .wr_data(m_data), .wr(m_write), .full(m_full),
    .rd_data(get_data), .exists(get_exists), .rd(get_read));

  lpa_injector u_inj (
    .clk, .rst_n, .enable(inj_enable), .i_fetch, .i_addr,
    .mem_rdata(b_rdata), .i_rdata, .cmd_valid, .cmd);

  lpa_accel u_acc (
    .clk, .rst_n, .cmd_valid, .cmd_in(cmd),
    .s_data, .s_exists, .s_read, .m_data, .m_write, .m_full,
    .mem_own(acc_mem_own), .p_en, .p_we, .p_addr, .p_wdata, .p_rdata,
    .busy(acc_busy), .exited(acc_exited), .fifo_overflow(acc_fifo_overflow),
    .run_cycles(acc_run_cycles));

  lpa_bus_mux u_mux_a (
    .sel(acc_mem_own),
    .h_en(d_en), .h_we(d_we), .h_addr(d_addr), .h_wdata(d_wdata),
    .x_en(p_en[0]), .x_we(p_we[0]), .x_addr(p_addr[0]), .x_wdata(p_wdata[0]),
    .m_en(a_en), .m_we(a_we), .m_addr(a_addr), .m_wdata(a_wdata));

  lpa_bus_mux u_mux_b (
    .sel(acc_mem_own),
    .h_en(i_fetch), .h_we(4'b0000), .h_addr(i_addr), .h_wdata('0),
    .x_en(p_en[1]), .x_we(p_we[1]), .x_addr(p_addr[1]), .x_wdata(p_wdata[1]),
    .m_en(b_en), .m_we(b_we), .m_addr(b_addr), .m_wdata(b_wdata));

  lpa_dpram #(.WORDS(MEM_WORDS)) u_mem (
    .clk,
    .a_en, .a_we, .a_addr, .a_wdata, .a_rdata,
    .b_en, .b_we, .b_addr, .b_wdata, .b_rdata);

  assign d_rdata    = a_rdata;
  assign p_rdata[0] = a_rdata;
  assign p_rdata[1] = b_rdata;
endmodule
