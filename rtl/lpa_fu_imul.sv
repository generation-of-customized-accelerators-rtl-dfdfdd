// lpa_fu_imul: integer multiply unit, low 32 bits of a * b.
//
// Like the other integer units it has a latency of one clock cycle: the
// product is combinational and the register chain behind the unit captures
// it at the end of the issue cycle.  The low half of the product is the
// same for signed and unsigned operands, so one unit serves both (the
// host's mul instruction).
// Interface: a, b operands, y product.  No clock.
// From the document: integer units have a latency of one cycle and integer
// multiplication is one of the supported operations.  My own choice: only
// the low product word (no high-word variants).
module lpa_fu_imul
  import lpa_pkg::*;
(
  input  word_t a,
  input  word_t b,
  output word_t y
);
  assign y = a * b;
endmodule
