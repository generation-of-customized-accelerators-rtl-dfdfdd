// lpa_fu_int: single-operation integer functional unit.
//
// Each FU of the accelerator implements exactly one operation of the host
// instruction set, chosen by the OP parameter when the instance is
// generated: add, reverse subtract, and, or, xor, the three barrel shifts,
// and the host's signed/unsigned compare (b - a with the most significant
// bit replaced by "a > b").  The unit is combinational; its result is
// captured by the first register of the unit's pool chain at the end of
// the issue cycle, which gives the latency of 1 cycle that the design
// specifies for integer units.
module lpa_fu_int
  import lpa_pkg::*;
#(
  parameter int_op_e OP = INT_ADD
) (
  input  word_t a,
  input  word_t b,
  output word_t y
);
  word_t diff;
  assign diff = b - a;

  always_comb begin
    unique case (OP)
      INT_ADD:  y = a + b;
      INT_RSUB: y = diff;
      INT_AND:  y = a & b;
      INT_OR:   y = a | b;
      INT_XOR:  y = a ^ b;
      INT_BSLL: y = a << b[4:0];
      INT_BSRL: y = a >> b[4:0];
      INT_BSRA: y = word_t'($signed(a) >>> b[4:0]);
      INT_CMP:  y = {($signed(a) > $signed(b)), diff[DW-2:0]};
      INT_CMPU: y = {(a > b), diff[DW-2:0]};
      default:  y = a + b;
    endcase
  end
endmodule
