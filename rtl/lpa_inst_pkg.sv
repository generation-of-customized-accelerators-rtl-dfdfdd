// lpa_inst_pkg: one customized instance of the loop accelerator template.
//
// An instance is fixed by its list of units, the register chain that each
// unit drives, the sources wired to each unit input, the constants, and the
// configuration words.  This instance runs five loops on one shared set of
// units (a multi-loop accelerator):
//
//   loop 0  the integer loop of the design's example data-flow graph:
//           r4 = MEM[r3]; r3 += 4; r10 = r4 >> r6; r9n = r4 << r12;
//           t = r10 | r9 (r9 of the previous iteration); r8 += 4;
//           MEM[r8] = t; r5 += 1; r18 = cmp(r5, r19); exit unless r18 >= 0.
//           II = 3, 5 time steps per iteration, 2 stages.
//   loop 1  single-precision inner product:
//           a = MEM[r5]; b = MEM[r6]; r7 -= 1; exit if r7 == 0;
//           r5 += 4; r6 += 4; r3 = r3 + a*b.
//           II = 4 (set by the 4-cycle fadd recurrence), 9 time steps, 3 stages.
//   loop 2  scaled integer-to-float conversion:
//           x = MEM[r3]; r5 -= 1; exit if r5 == 0; r3 += 4;
//           MEM[r4 + 4] = flt((x * r6) / 10); r4 += 4.
//           II = 3 (three additions share one adder), 8 time steps, 3 stages.
//   loop 3  integer division of an array by a loop invariant:
//           x = MEM[r3]; r5 -= 1; exit if r5 == 0; r3 += 4; r4 += 4;
//           MEM[r4] = x / r6.
//           II = 35: the divider is not pipelined and takes 35 cycles, and
//           the words keep issuing while it works; 38 time steps, 2 stages.
//   loop 4  single-precision division of an array by a loop invariant:
//           the same as loop 3 on the 32-cycle fp divider; II = 32,
//           35 time steps, 2 stages.
//
// The schedules (unit, issue step, operand positions) are written below as
// a single iteration each.  cfg_word() turns them into the configuration
// memory image the way the design describes: words for the first iteration
// are repeated every II steps to form prolog, steady state and epilog; the
// last steady-state word carries the address update that loops back.
// Additions of this implementation: every enable, FIFO push and the commit
// carry the stage of the iteration they belong to, so the controller can
// suppress the side effects of an iteration discarded by an exit; and the
// prolog is one pass longer than strictly needed so that every operation
// of the first iteration can take its operand from the input registers.
package lpa_inst_pkg;
  import lpa_pkg::*;

  // ---------------------------------------------------------------- sizes
  localparam int unsigned NFU    = 16;  // units, the two load/store ports included
  localparam int unsigned NIN    = 8;   // input registers
  localparam int unsigned NOUT   = 8;   // output FIFOs/registers
  localparam int unsigned NPOOL  = 17;  // register pool
  localparam int unsigned NCONST = 3;   // constants wired to multiplexers
  localparam int unsigned MAXSRC = 6;   // widest input multiplexer
  localparam int unsigned NSRC   = NIN + NPOOL + NCONST;
  localparam int unsigned STW    = 2;   // stage field width
  localparam int unsigned NSTG   = 1 << STW;
  localparam int unsigned CAW    = 9;   // configuration address width
  localparam int unsigned CDEPTH = 512; // configuration words
  localparam int unsigned NLOOP  = 5;
  localparam int unsigned OFIFO_DEPTH = 4;

  // ---------------------------------------------------------------- units
  localparam int U_LS0 = 0, U_LS1 = 1, U_IADD = 2, U_BRL = 3, U_BLL = 4,
                 U_CMP = 5, U_OR = 6, U_BGE = 7, U_BNE = 8, U_FMUL = 9,
                 U_FADD = 10, U_IMUL = 11, U_CDIV = 12, U_FCONV = 13,
                 U_IDIV = 14, U_FDIV = 15;

  localparam fu_kind_e FU_KIND [NFU] = '{
    FU_LSU, FU_LSU, FU_INT, FU_INT, FU_INT, FU_INT, FU_INT,
    FU_EXIT, FU_EXIT, FU_FMUL, FU_FADD, FU_IMUL, FU_CDIV, FU_FCONV, FU_IDIV, FU_FDIV};
  localparam int_op_e FU_INTOP [NFU] = '{
    INT_ADD, INT_ADD, INT_ADD, INT_BSRL, INT_BSLL, INT_CMP, INT_OR,
    INT_ADD, INT_ADD, INT_ADD, INT_ADD, INT_ADD, INT_ADD, INT_ADD, INT_ADD, INT_ADD};
  // Exit units: branch condition and whether the loop continues when the
  // branch is taken (the path recorded in the trace) -- both exits here are
  // the loop-back branch, so the loop exits when the branch is not taken.
  localparam br_cond_e FU_BRCOND [NFU] = '{
    BR_EQ, BR_EQ, BR_EQ, BR_EQ, BR_EQ, BR_EQ, BR_EQ, BR_GE, BR_NE, BR_EQ, BR_EQ,
    BR_EQ, BR_EQ, BR_EQ, BR_EQ, BR_EQ};
  // Constant divisor of each constant-division unit (1 elsewhere).
  localparam int unsigned FU_DIVISOR [NFU] = '{1, 1, 1, 1, 1, 1, 1, 1, 1, 1, 1, 1, 10, 1, 1, 1};

  // Register chain of each unit: first pool register and length.
  localparam int CH_BASE [NFU] = '{0, 1, 2, 5, 6, 8, 9, 0, 0, 10, 11, 12, 13, 14, 15, 16};
  localparam int CH_LEN  [NFU] = '{1, 1, 3, 1, 2, 1, 1, 0, 0, 1, 1, 1, 1, 1, 1, 1};

  // Source numbering: input registers 0..NIN-1, then pool registers, then
  // constants.  Named pool sources: S_<unit><chain position>.
  localparam int S_LS0_0  = NIN + 0,  S_LS1_0  = NIN + 1,
                 S_IADD_0 = NIN + 2,  S_IADD_1 = NIN + 3,  S_IADD_2 = NIN + 4,
                 S_BRL_0  = NIN + 5,  S_BLL_0  = NIN + 6,  S_BLL_1  = NIN + 7,
                 S_CMP_0  = NIN + 8,  S_OR_0   = NIN + 9,  S_FMUL_0 = NIN + 10,
                 S_FADD_0 = NIN + 11, S_IMUL_0 = NIN + 12, S_CDIV_0 = NIN + 13,
                 S_FCONV_0 = NIN + 14, S_IDIV_0 = NIN + 15,
                 S_FDIV_0 = NIN + 16;
  localparam int S_C1 = NIN + NPOOL, S_C4 = NIN + NPOOL + 1, S_CM1 = NIN + NPOOL + 2;
  localparam word_t CONSTS [NCONST] = '{32'd1, 32'd4, 32'hFFFF_FFFF};

  // Sources wired to each input multiplexer, -1 = unused position.
  localparam int SRC [NFU][2][MAXSRC] = '{
    /* LS0  */ '{'{0, 4, S_IADD_1, -1, -1, -1},       '{S_OR_0, -1, -1, -1, -1, -1}},
    /* LS1  */ '{'{1, S_IADD_0, S_IADD_1, S_IADD_2, -1, -1}, '{S_FCONV_0, S_IDIV_0, S_FDIV_0, -1, -1, -1}},
    /* IADD */ '{'{0, 1, 2, 4, 6, S_IADD_2},          '{S_C1, S_C4, S_CM1, -1, -1, -1}},
    /* BRL  */ '{'{S_LS0_0, -1, -1, -1, -1, -1},      '{3, -1, -1, -1, -1, -1}},
    /* BLL  */ '{'{S_LS0_0, -1, -1, -1, -1, -1},      '{1, -1, -1, -1, -1, -1}},
    /* CMP  */ '{'{S_IADD_0, -1, -1, -1, -1, -1},     '{5, -1, -1, -1, -1, -1}},
    /* OR   */ '{'{S_BRL_0, -1, -1, -1, -1, -1},      '{2, S_BLL_1, -1, -1, -1, -1}},
    /* BGE  */ '{'{S_CMP_0, -1, -1, -1, -1, -1},      '{-1, -1, -1, -1, -1, -1}},
    /* BNE  */ '{'{S_IADD_0, -1, -1, -1, -1, -1},     '{-1, -1, -1, -1, -1, -1}},
    /* FMUL */ '{'{S_LS0_0, -1, -1, -1, -1, -1},      '{S_LS1_0, -1, -1, -1, -1, -1}},
    /* FADD */ '{'{3, S_FADD_0, -1, -1, -1, -1},      '{S_FMUL_0, -1, -1, -1, -1, -1}},
    /* IMUL */ '{'{S_LS0_0, -1, -1, -1, -1, -1},      '{3, -1, -1, -1, -1, -1}},
    /* CDIV */ '{'{S_IMUL_0, -1, -1, -1, -1, -1},     '{-1, -1, -1, -1, -1, -1}},
    /* FCNV */ '{'{S_CDIV_0, -1, -1, -1, -1, -1},     '{-1, -1, -1, -1, -1, -1}},
    /* IDIV */ '{'{3, -1, -1, -1, -1, -1},            '{S_LS0_0, -1, -1, -1, -1, -1}},
    /* FDIV */ '{'{3, -1, -1, -1, -1, -1},            '{S_LS0_0, -1, -1, -1, -1, -1}}};

  // Number of wired sources of each multiplexer.
  function automatic int src_count(int f, int k);
    int n = 0;
    for (int p = 0; p < MAXSRC; p++) if (SRC[f][k][p] >= 0) n = p + 1;
    return n;
  endfunction

  // ------------------------------------------------------ configuration word
  typedef struct packed {
    logic [NFU-1:0]                      en;       // unit issues an operation
    logic [NFU-1:0][2:0]                 fn;       // operation modifier (load/store kind, fsub)
    logic [NFU-1:0][STW-1:0]             stg;      // stage of the issuing iteration
    logic [NFU-1:0][1:0][MAXSRC-1:0]     sel;      // hot-bit multiplexer controls
    logic [NPOOL-1:0]                    we;       // pool register write enables
    logic [NOUT-1:0]                     push;     // output FIFO push
    logic [NOUT-1:0][STW-1:0]            push_stg;
    logic                                commit;   // an iteration completes
    logic [STW-1:0]                      commit_stg;
    logic                                newpass;  // first word of a group of II words
    logic [CAW-1:0]                      addr_upd; // steady state: jump back by this much
    logic                                done;     // last word of the sequence
  } cfg_word_t;

  // ------------------------------------------------------------ commands
  localparam int unsigned NINW = $clog2(NIN + 1);
  localparam int unsigned FUW  = $clog2(NFU);
  typedef struct packed {
    logic [CAW-1:0]             start;     // first configuration word
    logic [NINW-1:0]            nin;       // operands expected from the host
    logic [NINW-1:0]            nout;      // results returned to the host
    logic [NOUT-1:0][FUW-1:0]   out_fu;    // unit that feeds each output FIFO
    logic [NOUT-1:0][NINW-1:0]  out_init;  // input register copied at start (NIN = none)
  } cmd_t;

  // ------------------------------------------------- single-iteration schedules
  typedef struct packed {
    int loop; int u; int lt; int fn; int a; int a0; int b; int b0; bit wr;
  } op_t;  // a/b: multiplexer position, a0/b0: position in the first iteration
  localparam int NOPS = 41;
  localparam op_t OPS [NOPS] = '{
    // loop 0 (II 3)
    '{0, U_LS0, 0, int'(LS_LW), 2, 1, -1, -1, 1},   // node 6: ld  r4 = [r3]
    '{0, U_IADD,0, 0,     5, 4,  0,  0, 1},   // node 3: add r5 += 1
    '{0, U_IADD,1, 0,     5, 3,  1,  1, 1},   // node 9: add r3 += 4
    '{0, U_CMP, 1, 0,     0, 0,  0,  0, 1},   // node 7: cmp r18 = r19 - r5
    '{0, U_IADD,2, 0,     5, 0,  1,  1, 1},   // node 5: add r8 += 4
    '{0, U_BRL, 2, 0,     0, 0,  0,  0, 1},   // node 0: brl r10 = r4 >> r6
    '{0, U_BLL, 2, 0,     0, 0,  0,  0, 1},   // node 4: bll r9 = r4 << r12
    '{0, U_BGE, 2, 0,     0, 0, -1, -1, 0},   // node 8: bge r18 (exit)
    '{0, U_OR,  3, 0,     0, 0,  1,  0, 1},   // node 1: or  t = r10 | r9
    '{0, U_LS0, 4, int'(LS_SW), 2, 2,  0,  0, 0},   // node 2: st  [r8] = t
    // loop 1 (II 4)
    '{1, U_LS0, 0, int'(LS_LW), 2, 0, -1, -1, 1},   // ld  a = [r5]
    '{1, U_LS1, 0, int'(LS_LW), 1, 0, -1, -1, 1},   // ld  b = [r6]
    '{1, U_IADD,0, 0,     5, 2,  2,  2, 1},   // add r7 -= 1
    '{1, U_BNE, 1, 0,     0, 0, -1, -1, 0},   // bne r7 (exit when zero)
    '{1, U_IADD,1, 0,     5, 0,  1,  1, 1},   // add r5 += 4
    '{1, U_FMUL,2, 0,     0, 0,  0,  0, 1},   // fmul p = a * b
    '{1, U_IADD,2, 0,     5, 1,  1,  1, 1},   // add r6 += 4
    '{1, U_FADD,5, 0,     1, 0,  0,  0, 1},   // fadd r3 = r3 + p
    // loop 2 (II 3)
    '{2, U_LS0, 0, int'(LS_LW), 2, 0, -1, -1, 1},   // ld   x = [r3]
    '{2, U_IADD,0, 0,     5, 2,  2,  2, 1},   // add  r5 -= 1
    '{2, U_IADD,1, 0,     5, 0,  1,  1, 1},   // add  r3 += 4
    '{2, U_BNE, 1, 0,     0, 0, -1, -1, 0},   // bne  r5 (exit when zero)
    '{2, U_IMUL,2, 0,     0, 0,  0,  0, 1},   // mul  p = x * r6
    '{2, U_CDIV,3, 0,     0, 0, -1, -1, 1},   // idiv q = p / 10
    '{2, U_IADD,5, 0,     5, 1,  1,  1, 1},   // add  r4 += 4
    '{2, U_FCONV,6, 0,    0, 0, -1, -1, 1},   // flt  f = q
    '{2, U_LS1, 7, int'(LS_SW), 2, 2,  0,  0, 0},   // sw   [r4] = f
    // loop 3 (II 35, set by the non-pipelined divider)
    '{3, U_LS0, 0, int'(LS_LW), 2, 0, -1, -1, 1},   // ld   x = [r3]
    '{3, U_IADD,0, 0,     5, 2,  2,  2, 1},   // add  r5 -= 1
    '{3, U_IADD,1, 0,     5, 0,  1,  1, 1},   // add  r3 += 4
    '{3, U_BNE, 1, 0,     0, 0, -1, -1, 0},   // bne  r5 (exit when zero)
    '{3, U_IDIV,2, 0,     0, 0,  0,  0, 1},   // idiv q = x / r6
    '{3, U_IADD,2, 0,     5, 1,  1,  1, 1},   // add  r4 += 4
    '{3, U_LS1,37, int'(LS_SW), 3, 3,  1,  1, 0},   // sw   [r4] = q
    // loop 4 (II 32, set by the non-pipelined fp divider)
    '{4, U_LS0, 0, int'(LS_LW), 2, 0, -1, -1, 1},   // ld   x = [r3]
    '{4, U_IADD,0, 0,     5, 2,  2,  2, 1},   // add  r5 -= 1
    '{4, U_IADD,1, 0,     5, 0,  1,  1, 1},   // add  r3 += 4
    '{4, U_BNE, 1, 0,     0, 0, -1, -1, 0},   // bne  r5 (exit when zero)
    '{4, U_FDIV,2, 0,     0, 0,  0,  0, 1},   // fdiv q = x / r6
    '{4, U_IADD,2, 0,     5, 1,  1,  1, 1},   // add  r4 += 4
    '{4, U_LS1,34, int'(LS_SW), 3, 3,  2,  2, 0}};  // sw   [r4] = q

  typedef struct packed { int loop; int o; int lt; } push_t;
  localparam int NPUSH = 20;
  localparam push_t PUSHES [NPUSH] = '{
    '{0, 0, 2}, '{0, 1, 2}, '{0, 2, 2}, '{0, 3, 1}, '{0, 4, 1}, '{0, 5, 1}, '{0, 6, 0},
    '{1, 0, 1}, '{1, 1, 2}, '{1, 2, 0}, '{1, 3, 8},
    '{2, 0, 1}, '{2, 1, 5}, '{2, 2, 0},
    '{3, 0, 1}, '{3, 1, 2}, '{3, 2, 0},
    '{4, 0, 1}, '{4, 1, 2}, '{4, 2, 0}};

  localparam int LOOP_II  [NLOOP] = '{3, 4, 3, 35, 32};
  localparam int LOOP_T   [NLOOP] = '{5, 9, 8, 38, 35};  // time steps of one iteration
  localparam int LOOP_NIN [NLOOP] = '{7, 4, 4, 4, 4};
  // Outputs: loop 0 -> r8 r9 r10 r4 r3 r18 r5 ; loop 1 -> r5 r6 r7 r3 ;
  // loop 2 -> r3 r4 r5 ; loops 3 and 4 -> r3 r4 r5
  localparam int OUT_FU   [NLOOP][NOUT] = '{
    '{U_IADD, U_BLL, U_BRL, U_LS0, U_IADD, U_CMP, U_IADD, 0},
    '{U_IADD, U_IADD, U_IADD, U_FADD, 0, 0, 0, 0},
    '{U_IADD, U_IADD, U_IADD, 0, 0, 0, 0, 0},
    '{U_IADD, U_IADD, U_IADD, 0, 0, 0, 0, 0},
    '{U_IADD, U_IADD, U_IADD, 0, 0, 0, 0, 0}};
  localparam int OUT_INIT [NLOOP][NOUT] = '{
    '{0, 2, NIN, NIN, 4, NIN, 6, NIN},
    '{0, 1, 2, 3, NIN, NIN, NIN, NIN},
    '{0, 1, 2, NIN, NIN, NIN, NIN, NIN},
    '{0, 1, 2, NIN, NIN, NIN, NIN, NIN},
    '{0, 1, 2, NIN, NIN, NIN, NIN, NIN}};
  localparam int LOOP_NOUT [NLOOP] = '{7, 4, 3, 3, 3};

  function automatic int n_stages(int l);
    return (LOOP_T[l] + LOOP_II[l] - 1) / LOOP_II[l];
  endfunction
  function automatic int loop_start(int l);
    int a = 0;
    for (int k = 0; k < l; k++) a += 2 * n_stages(k) * LOOP_II[k];
    return a;
  endfunction

  function automatic cmd_t loop_cmd(int l);
    cmd_t c = '0;
    c.start = CAW'(loop_start(l));
    c.nin   = NINW'(LOOP_NIN[l]);
    c.nout  = NINW'(LOOP_NOUT[l]);
    for (int o = 0; o < NOUT; o++) begin
      c.out_fu[o]   = FUW'(OUT_FU[l][o]);
      c.out_init[o] = NINW'(OUT_INIT[l][o]);
    end
    return c;
  endfunction

  // Is an item of stage st present in pass p of a sequence with s stages?
  // Passes 0..s-1 are the prolog, pass s the steady state, s+1..2s-1 the epilog.
  function automatic bit in_pass(int p, int st, int s);
    if (p < s)  return st <= p;
    if (p == s) return 1'b1;
    return st >= p - s;
  endfunction

  function automatic cfg_word_t put_op(input cfg_word_t wi, input op_t op, input int p,
                                       input int s, input int ii, input int slot);
    cfg_word_t w = wi;
    int st = op.lt / ii;
    bit first = (p - st) == 0;      // the op belongs to the first iteration
    int a = first ? op.a0 : op.a;
    int b = first ? op.b0 : op.b;
    if ((op.lt % ii) != slot || !in_pass(p, st, s)) return w;
    w.en[op.u]  = 1'b1;
    w.fn[op.u]  = 3'(op.fn);
    w.stg[op.u] = STW'(st);
    if (a >= 0) w.sel[op.u][0][a] = 1'b1;
    if (b >= 0) w.sel[op.u][1][b] = 1'b1;
    return w;
  endfunction

  function automatic cfg_word_t put_we(input cfg_word_t wi, input op_t op, input int slot,
                                       input int ii);
    cfg_word_t w = wi;
    int wl = op.lt + int'(fu_latency(FU_KIND[op.u])) - 1;
    if (op.wr && (wl % ii) == slot)
      for (int r = 0; r < CH_LEN[op.u]; r++) w.we[CH_BASE[op.u] + r] = 1'b1;
    return w;
  endfunction

  // Configuration word at address addr (all zero outside the sequences).
  function automatic cfg_word_t cfg_word(input int addr);
    cfg_word_t w = '0;
    for (int l = 0; l < NLOOP; l++) begin
      int ii   = LOOP_II[l];
      int s    = n_stages(l);
      int base = loop_start(l);
      if (addr >= base && addr < base + 2 * s * ii) begin
        int p       = (addr - base) / ii;
        int slot    = (addr - base) % ii;
        int last_lt = LOOP_T[l] - 1;
        w.newpass = (slot == 0);
        for (int k = 0; k < NOPS; k++)
          if (OPS[k].loop == l) begin
            w = put_op(w, OPS[k], p, s, ii, slot);
            w = put_we(w, OPS[k], slot, ii);
          end
        for (int k = 0; k < NPUSH; k++)
          if (PUSHES[k].loop == l && (PUSHES[k].lt % ii) == slot
              && in_pass(p, PUSHES[k].lt / ii, s)) begin
            w.push[PUSHES[k].o]     = 1'b1;
            w.push_stg[PUSHES[k].o] = STW'(PUSHES[k].lt / ii);
          end
        if ((last_lt % ii) == slot && in_pass(p, last_lt / ii, s)) begin
          w.commit     = 1'b1;
          w.commit_stg = STW'(last_lt / ii);
        end
        if (p == s && slot == ii - 1)         w.addr_upd = CAW'(ii - 1);
        if (p == 2 * s - 1 && slot == ii - 1) w.done     = 1'b1;
      end
    end
    return w;
  endfunction

endpackage
