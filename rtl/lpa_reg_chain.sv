// lpa_reg_chain: one chain of the register pool.
//
// Every FU drives a chain of 32-bit registers that keeps its results alive
// until all consumers have read them.  Each register has its own write
// enable from the configuration word.  A register with its enable set loads
// the value of the register above it (the first loads the FU result), so a
// write moves data down the chain only as far as the first register whose
// enable is clear; values below it stay in place.  The schedule decides the
// enables, so the position of every value is known at every time step.
module lpa_reg_chain
  import lpa_pkg::*;
#(
  parameter int unsigned LEN = 2
) (
  input  logic           clk,
  input  word_t          d,
  input  logic [LEN-1:0] we,
  output word_t          q [LEN]
);
  always_ff @(posedge clk) begin
    for (int i = 0; i < LEN; i++)
      if (we[i]) q[i] <= (i == 0) ? d : q[i-1];
  end
endmodule
