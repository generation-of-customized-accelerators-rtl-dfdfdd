// lpa_fu_cdiv: integer division by a constant fixed when the accelerator is
// generated, computed as a multiplication by a scaled reciprocal.
//
// For a divisor D with S = ceil(log2 D), the 33-bit multiplier
// M = ceil(2^(32+S) / D) gives floor(x / D) = (x * M) >> (32 + S) for every
// 32-bit unsigned x.  A signed unit divides the magnitude and restores the
// sign, so the quotient is truncated toward zero like the host's idiv.
// Pipeline: cycle 0 registers the dividend magnitude and sign, cycle 1
// registers the product, and in cycle 2 the shifted (and sign-corrected)
// quotient is on y, so the pool register written at the end of cycle 2
// holds it: latency 3, a new division may start every cycle.
// Interface: clk, x dividend, y quotient.  The dividend is the operand
// read in the issue cycle; there is no start input because the unit has
// no side effects.
// From the document: division by a constant with a latency of 3 cycles via
// reciprocal multiplication.  My own choice: the exact round-up reciprocal
// method and the split of the three cycles.
module lpa_fu_cdiv
  import lpa_pkg::*;
#(
  parameter int unsigned DIVISOR = 3,
  parameter bit          SIGNED  = 1'b1
) (
  input  logic  clk,
  input  word_t x,
  output word_t y
);
  localparam int unsigned S = $clog2(DIVISOR);
  localparam logic [65:0] M = ((66'd1 << (32 + S)) + 66'(DIVISOR) - 66'd1) / 66'(DIVISOR);

  logic        neg1, neg2;
  word_t       x1;
  logic [65:0] p2;
  word_t       q;

  always_ff @(posedge clk) begin
    neg1 <= SIGNED && x[DW-1];
    x1   <= (SIGNED && x[DW-1]) ? word_t'(-x) : x;
    neg2 <= neg1;
    p2   <= 66'(x1) * M;
  end
  assign q = word_t'(p2 >> (32 + S));
  assign y = neg2 ? word_t'(-q) : q;
endmodule
