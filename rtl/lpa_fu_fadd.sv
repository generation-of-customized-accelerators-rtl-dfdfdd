// lpa_fu_fadd: pipelined single-precision floating-point add/subtract.
//
// The only FU that implements two operations: fn[0] clear adds (a + b),
// set computes b - a like the host's reverse-subtract instruction.  A new
// operation can be issued every cycle.  Operands are registered at the end
// of the issue cycle, the sum is formed and rounded in the next, and a
// third register stage follows, so the result is on y during the fourth
// cycle and readable from the pool one cycle later: latency 4, as the
// design specifies.  The split into stages is this implementation's own;
// arithmetic is in lpa_fp_pkg (no denormals, round to nearest even).
module lpa_fu_fadd
  import lpa_pkg::*;
  import lpa_fp_pkg::*;
(
  input  logic  clk,
  input  logic  sub,
  input  word_t a,
  input  word_t b,
  output word_t y
);
  word_t a1, b1, s2, s3;
  always_ff @(posedge clk) begin
    a1 <= sub ? {~a[31], a[30:0]} : a;
    b1 <= b;
    s2 <= fp_add(a1, b1);
    s3 <= s2;
  end
  assign y = s3;
endmodule
