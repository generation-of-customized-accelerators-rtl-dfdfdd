// lpa_dpram: dual-port local memory for code, data and communication routines.
//
// Two independent ports, each with enable, four byte write enables and a
// byte address; read data are registered (one-cycle read latency), like an
// FPGA block RAM.  Byte lane 3 of the enables is byte 0 of the word
// (big-endian, bits 31:24).  The default size, 32768 words, is the 128 KiB
// of block RAM the reference system uses for code and data.
module lpa_dpram
  import lpa_pkg::*;
#(
  parameter int unsigned WORDS = 32768
) (
  input  logic       clk,
  input  logic       a_en,
  input  logic [3:0] a_we,
  input  word_t      a_addr,
  input  word_t      a_wdata,
  output word_t      a_rdata,
  input  logic       b_en,
  input  logic [3:0] b_we,
  input  word_t      b_addr,
  input  word_t      b_wdata,
  output word_t      b_rdata
);
  localparam int unsigned AW = $clog2(WORDS);
  logic [31:0] mem [WORDS];
  logic [AW-1:0] ai, bi;
  assign ai = a_addr[AW+1:2];
  assign bi = b_addr[AW+1:2];

  always_ff @(posedge clk) begin
    if (a_en) begin
      for (int i = 0; i < 4; i++) if (a_we[i]) mem[ai][8*i +: 8] <= a_wdata[8*i +: 8];
      a_rdata <= mem[ai];
    end
  end
  always_ff @(posedge clk) begin
    if (b_en) begin
      for (int i = 0; i < 4; i++) if (b_we[i]) mem[bi][8*i +: 8] <= b_wdata[8*i +: 8];
      b_rdata <= mem[bi];
    end
  end
endmodule
