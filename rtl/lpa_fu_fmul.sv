// lpa_fu_fmul: pipelined single-precision floating-point multiplier.
//
// A new product can be issued every cycle.  Operands are registered at the
// end of the issue cycle and the rounded product at the end of the next,
// so the result is on y in the third cycle: latency 3, as the design
// specifies.  Arithmetic is in lpa_fp_pkg (no denormals, round to nearest
// even); the stage split is this implementation's own.
module lpa_fu_fmul
  import lpa_pkg::*;
  import lpa_fp_pkg::*;
(
  input  logic  clk,
  input  word_t a,
  input  word_t b,
  output word_t y
);
  word_t a1, b1, p2;
  always_ff @(posedge clk) begin
    a1 <= a;
    b1 <= b;
    p2 <= fp_mul(a1, b1);
  end
  assign y = p2;
endmodule
