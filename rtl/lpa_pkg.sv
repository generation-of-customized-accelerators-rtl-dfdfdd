// lpa_pkg: types and constants shared by the loop pipelining accelerator.
//
// The accelerator is a template: each instance has its own set of
// single-operation functional units (FUs), its own register pool and its
// own configuration words.  This package holds what does not vary between
// instances: the data width, the FU operation kinds, the load/store kinds,
// the exit-condition codes, and the unit latencies quoted by the design
// (integer 1, load/store 2, fadd 4, fmul 3, constant division 3,
// integer division 35, fdiv 32).  The instance itself lives in
// lpa_inst_pkg.
package lpa_pkg;

  localparam int unsigned DW = 32;              // all FUs and registers are 32-bit
  typedef logic [DW-1:0] word_t;

  // Latencies in clock cycles, from issue to the first step that can read
  // the result from the register pool.
  localparam int unsigned LAT_INT  = 1;
  localparam int unsigned LAT_LSU  = 2;
  localparam int unsigned LAT_FADD = 4;
  localparam int unsigned LAT_FMUL = 3;
  localparam int unsigned LAT_CDIV = 3;
  localparam int unsigned LAT_IDIV = 35;
  localparam int unsigned LAT_FDIV = 32;

  // Operation of an integer FU (one operation per FU instance).
  typedef enum logic [3:0] {
    INT_ADD,   // a + b           (add, addi, addik ...)
    INT_RSUB,  // b - a           (rsub)
    INT_AND,
    INT_OR,
    INT_XOR,
    INT_BSLL,  // a << b[4:0]     (bsll)
    INT_BSRL,  // a >> b[4:0]     (bsrl)
    INT_BSRA,  // a >>> b[4:0]    (bsra)
    INT_CMP,   // b - a, MSB = (a > b) signed    (cmp)
    INT_CMPU   // b - a, MSB = (a > b) unsigned  (cmpu)
  } int_op_e;

  // Condition of a MicroBlaze conditional branch, register against zero.
  typedef enum logic [2:0] {
    BR_EQ, BR_NE, BR_LT, BR_LE, BR_GT, BR_GE
  } br_cond_e;

  // Access kind of a load/store unit operation (selected by the FU's
  // function bit pair in the configuration word).
  typedef enum logic [2:0] {
    LS_LW, LS_LHU, LS_LBU, LS_SW, LS_SH, LS_SB
  } ls_kind_e;

  // Kinds of unit that can be placed in an instance.
  typedef enum logic [3:0] {
    FU_LSU,     // load/store port
    FU_INT,     // integer single-operation unit
    FU_EXIT,    // termination-condition unit
    FU_FADD,    // floating-point add/subtract
    FU_FMUL,    // floating-point multiply
    FU_IMUL,
    FU_IDIV,
    FU_CDIV,
    FU_FDIV,
    FU_FCONV
  } fu_kind_e;

  function automatic int unsigned fu_latency(fu_kind_e k);
    case (k)
      FU_LSU:  return LAT_LSU;
      FU_FADD: return LAT_FADD;
      FU_FMUL: return LAT_FMUL;
      FU_CDIV: return LAT_CDIV;
      FU_IDIV: return LAT_IDIV;
      FU_FDIV: return LAT_FDIV;
      default: return LAT_INT;
    endcase
  endfunction

endpackage
