// lpa_out_fifo: output FIFO and output register.
//
// Because iterations overlap, the FU that produces a live-out value can
// produce it for later iterations before the current one completes.  The
// value is therefore pushed into a small FIFO when produced, and moved into
// the output register only when its iteration commits.  Values of an
// iteration discarded by an exit stay in the FIFO and are dropped at the
// next start, so the output register holds the value of the last completed
// iteration.  At start the register is loaded with an initial value (the
// host register's value from the input registers), which is what the host
// sees if no iteration completes.
module lpa_out_fifo
  import lpa_pkg::*;
#(
  parameter int unsigned DEPTH = 4
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,    // flush and load init
  input  word_t init,
  input  logic  push,
  input  word_t din,
  input  logic  commit,   // pop the oldest value into the output register
  output word_t q,
  output logic  overflow  // sticky: push into a full FIFO
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  word_t mem [DEPTH];
  logic [AW-1:0] wp, rp;
  logic [AW:0]   cnt;
  logic          full, pop, bypass;
  assign full   = (cnt == (AW+1)'(DEPTH));
  assign pop    = commit && (cnt != '0);
  assign bypass = commit && (cnt == '0) && push;  // value produced in its commit step

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0; rp <= '0; cnt <= '0; q <= '0; overflow <= 1'b0;
    end else if (start) begin
      wp <= '0; rp <= '0; cnt <= '0; q <= init; overflow <= 1'b0;
    end else begin
      if (push && !bypass) begin
        mem[wp] <= din;
        wp <= (wp == AW'(DEPTH - 1)) ? '0 : wp + 1'b1;
      end
      if (push && !bypass && full && !pop) overflow <= 1'b1;
      if (pop) begin
        q  <= mem[rp];
        rp <= (rp == AW'(DEPTH - 1)) ? '0 : rp + 1'b1;
      end else if (bypass)
        q <= din;
      cnt <= cnt + (AW+1)'(push && !bypass && !(full && !pop)) - (AW+1)'(pop);
    end
  end
endmodule
