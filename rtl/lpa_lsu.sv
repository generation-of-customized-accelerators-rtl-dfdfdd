// lpa_lsu: load/store unit, one of the two memory ports of the accelerator.
//
// An operation is issued with start, a byte address on a and, for stores,
// the data on b; kind selects word, halfword or byte access.  The request
// goes straight to the local memory port.  Memory is read synchronously,
// so load data appear in the next cycle; the unit aligns and zero-extends
// them there and the pool chain captures them at the end of that cycle:
// a load latency of 2 cycles, the value the scheduler assumes for on-chip
// memory.  Stores complete in the issue cycle.  Byte order is big-endian,
// like the host (byte 0 is bits 31:24).  Accesses are assumed aligned; the
// low address bits are ignored for words.
module lpa_lsu
  import lpa_pkg::*;
(
  input  logic      clk,
  input  logic      start,
  input  ls_kind_e  kind,
  input  word_t     a,        // byte address
  input  word_t     b,        // store data
  output logic      m_en,
  output logic [3:0] m_we,
  output word_t     m_addr,   // byte address
  output word_t     m_wdata,
  input  word_t     m_rdata,
  output word_t     y         // load result, valid the cycle after issue
);
  ls_kind_e   kind_q;
  logic [1:0] off_q;
  logic       store;

  assign store  = (kind == LS_SW) || (kind == LS_SH) || (kind == LS_SB);
  assign m_en   = start;
  assign m_addr = a;

  always_comb begin
    m_we    = 4'b0000;
    m_wdata = b;
    unique case (kind)
      LS_SW: m_we = 4'b1111;
      LS_SH: begin
        m_we    = a[1] ? 4'b0011 : 4'b1100;
        m_wdata = {2{b[15:0]}};
      end
      LS_SB: begin
        m_we    = 4'b1000 >> a[1:0];
        m_wdata = {4{b[7:0]}};
      end
      default: ;
    endcase
    if (!(start && store)) m_we = 4'b0000;
  end

  always_ff @(posedge clk) begin
    kind_q <= kind;
    off_q  <= a[1:0];
  end

  always_comb begin
    unique case (kind_q)
      LS_LHU:  y = {16'd0, off_q[1] ? m_rdata[15:0] : m_rdata[31:16]};
      LS_LBU:  y = {24'd0, m_rdata[31 - 8*off_q -: 8]};
      default: y = m_rdata;
    endcase
  end
endmodule
