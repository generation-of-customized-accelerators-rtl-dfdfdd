// lpa_fsl_fifo: one fast simplex link channel.
//
// A point-to-point, unidirectional FIFO between the host processor and the
// accelerator, one per direction.  The writer sees full, the reader sees
// exists and the data word at the head (first-word-fall-through).  A write
// when full is dropped; an assertion flags it.  The depth is this
// implementation's choice.
module lpa_fsl_fifo
  import lpa_pkg::*;
#(
  parameter int unsigned DEPTH = 16
) (
  input  logic  clk,
  input  logic  rst_n,
  input  word_t wr_data,
  input  logic  wr,
  output logic  full,
  output word_t rd_data,
  output logic  exists,
  input  logic  rd
);
  localparam int unsigned AW = $clog2(DEPTH);
  word_t mem [DEPTH];
  logic [AW-1:0] wp, rp;
  logic [AW:0]   cnt;
  logic do_wr, do_rd;

  assign full    = (cnt == (AW+1)'(DEPTH));
  assign exists  = (cnt != '0);
  assign rd_data = mem[rp];
  assign do_wr   = wr && !full;
  assign do_rd   = rd && exists;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0; rp <= '0; cnt <= '0;
    end else begin
      if (do_wr) wp <= wp + 1'b1;
      if (do_rd) rp <= rp + 1'b1;
      cnt <= cnt + (AW+1)'(do_wr) - (AW+1)'(do_rd);
    end
  end
  always_ff @(posedge clk) if (do_wr) mem[wp] <= wr_data;

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) wr |-> !full);
endmodule
