// lpa_bus_mux: memory bus multiplexer.
//
// Connects one memory port either to a host bus (sel = 0) or to an
// accelerator load/store port (sel = 1).  The accelerator drives sel while
// it runs a loop; the host is then waiting on the result link and does not
// use the memory.  Read data go to both masters.
module lpa_bus_mux
  import lpa_pkg::*;
(
  input  logic       sel,
  input  logic       h_en,
  input  logic [3:0] h_we,
  input  word_t      h_addr,
  input  word_t      h_wdata,
  input  logic       x_en,
  input  logic [3:0] x_we,
  input  word_t      x_addr,
  input  word_t      x_wdata,
  output logic       m_en,
  output logic [3:0] m_we,
  output word_t      m_addr,
  output word_t      m_wdata
);
  assign m_en    = sel ? x_en    : h_en;
  assign m_we    = sel ? x_we    : h_we;
  assign m_addr  = sel ? x_addr  : h_addr;
  assign m_wdata = sel ? x_wdata : h_wdata;
endmodule
