// lpa_fu_exit: termination-condition unit.
//
// Evaluates one conditional branch of the accelerated loop trace: the
// operand is compared with zero under COND (eq, ne, lt, le, gt, ge, as the
// host's branch-on-register instructions do).  The trace records which way
// the branch went; LOOP_ON_TAKEN says that the recorded path took it.  When
// an issued evaluation goes the other way the unit raises exit_o, in the
// same cycle (latency 1 like every integer unit).  The controller uses it to
// discard the iteration and drain the pipeline.
module lpa_fu_exit
  import lpa_pkg::*;
#(
  parameter br_cond_e COND          = BR_GE,
  parameter bit       LOOP_ON_TAKEN = 1'b1
) (
  input  logic  start,   // evaluation issued by a live iteration
  input  word_t a,
  output logic  exit_o
);
  logic taken;
  always_comb begin
    unique case (COND)
      BR_EQ:   taken = (a == '0);
      BR_NE:   taken = (a != '0);
      BR_LT:   taken = $signed(a) <  0;
      BR_LE:   taken = $signed(a) <= 0;
      BR_GT:   taken = $signed(a) >  0;
      BR_GE:   taken = $signed(a) >= 0;
      default: taken = 1'b0;
    endcase
  end
  assign exit_o = start & (taken != LOOP_ON_TAKEN);
endmodule
