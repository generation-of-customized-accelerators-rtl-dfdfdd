// lpa_in_mux: FU input multiplexer with hot-bit control.
//
// Each FU input is wired only to the sources the schedule needs (input
// registers, pool registers, constants), so the width N differs from input
// to input.  The configuration word holds one select bit per wired source;
// at most one is set.  The multiplexer is an AND-OR tree: with no bit set
// the output is zero.
module lpa_in_mux
  import lpa_pkg::*;
#(
  parameter int unsigned N = 2
) (
  input  word_t        d [N],
  input  logic [N-1:0] sel,
  output word_t        y
);
  always_comb begin
    y = '0;
    for (int i = 0; i < N; i++) y |= d[i] & {DW{sel[i]}};
  end
endmodule
