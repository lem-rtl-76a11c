// lem_pkg: constants, types and helper functions shared by the LEM
// microcode expander and the RISC-V vector unit built on it.
//
// The micro-op bundle (uop_t) is the single control word that every decoder
// extension produces and that the vector register file, the extended ALU, the
// multiplier, the memory port and the FP port consume. It mirrors the
// grouping of the vector register micro-op: operand requests (register, double
// word, operand manipulation), write-back request, mask and index controls,
// hazard information, and the functional-unit controls.
//
// Sizes follow the main configuration (64-bit datapath, VLEN = 256, 32 vector
// registers). The number of accumulator and index registers, the index width
// and the encodings are this design's own choices.
package lem_pkg;

  localparam int XLEN       = 64;
  localparam int VLEN       = 256;
  localparam int NVREG      = 32;
  localparam int DW_PER_REG = VLEN / 64;            // 64-bit double words per register
  localparam int DW_W       = $clog2(DW_PER_REG);
  localparam int VLENB      = VLEN / 8;
  localparam int VLENB_W    = $clog2(VLENB);
  localparam int N_ACC      = 2;                     // accumulator registers in the ALU
  localparam int ACC_W      = $clog2(N_ACC);
  localparam int N_IDX      = 2;                     // index registers in the register file
  localparam int IDXR_W     = $clog2(N_IDX);
  localparam int IDX_W      = 16;                    // index register / index adder width
  localparam int CNT_W      = 16;                    // expander counter width
  localparam int VLMAX_MAX  = VLEN;                  // LMUL=8, SEW=8
  localparam int VL_W       = $clog2(VLMAX_MAX) + 1;

  // ---------------------------------------------------------------- encodings
  typedef enum logic [1:0] {SEW8 = 2'd0, SEW16 = 2'd1, SEW32 = 2'd2, SEW64 = 2'd3} sew_e;

  localparam logic [6:0] OP_V      = 7'b1010111;
  localparam logic [6:0] OP_LOADFP = 7'b0000111;
  localparam logic [6:0] OP_STOREFP= 7'b0100111;

  localparam logic [2:0] F3_OPIVV = 3'b000;
  localparam logic [2:0] F3_OPFVV = 3'b001;
  localparam logic [2:0] F3_OPMVV = 3'b010;
  localparam logic [2:0] F3_OPIVI = 3'b011;
  localparam logic [2:0] F3_OPIVX = 3'b100;
  localparam logic [2:0] F3_OPFVF = 3'b101;
  localparam logic [2:0] F3_OPMVX = 3'b110;
  localparam logic [2:0] F3_OPCFG = 3'b111;

  // ------------------------------------------------------------ vector CSRs
  typedef struct packed {
    logic       vill;
    logic       vma;
    logic       vta;
    logic [2:0] vsew;
    logic [2:0] vlmul;
  } vtype_t;

  typedef struct packed {
    vtype_t          vtype;
    logic [VL_W-1:0] vl;
    logic [VL_W-1:0] vstart;
    logic [1:0]      vxrm;
  } vcsr_t;

  // ------------------------------------------------------- register requests
  typedef struct packed {
    logic            valid;
    logic [4:0]      vreg;
    logic [DW_W-1:0] dw;
  } vreg_req_t;

  typedef struct packed {
    logic [2:0] boff;   // byte offset inside the double word
    sew_e       eew;    // element width
    logic       sext;   // sign (1) or zero (0) extension to 64 bits
  } opmanip_t;

  typedef enum logic [3:0] {
    SRC_VREG, SRC_XREG, SRC_XREG2, SRC_FREG, SRC_IMM, SRC_ZERO, SRC_ONE, SRC_ELEM, SRC_IDX
  } src_sel_e;

  typedef struct packed {
    src_sel_e    sel;
    vreg_req_t   req;
    opmanip_t    manip;
    logic        by_index;  // element number comes from the index adder
    logic        reduce;    // replaced by the FP reduction queue head
  } src_t;

  typedef enum logic [1:0] {WB_NONE, WB_ELEM, WB_MBIT, WB_MDW} wb_mode_e;

  typedef struct packed {
    wb_mode_e  mode;
    vreg_req_t req;
    opmanip_t  manip;
    logic [5:0] mbit;       // bit of the double word for WB_MBIT
    logic      xreg;        // result also goes to the scalar destination
    logic      reduce;      // FP result goes to the reduction queue
  } wb_t;

  // --------------------------------------------------------------- index unit
  typedef enum logic [1:0] {IA_IDXREG, IA_MASKBIT, IA_DEC} idx_in_e;

  typedef struct packed {
    idx_in_e            a_sel;
    logic [IDXR_W-1:0]  a_reg;
    logic [IDX_W-1:0]   a_val;
    idx_in_e            b_sel;
    logic [IDXR_W-1:0]  b_reg;
    logic [IDX_W-1:0]   b_val;
    logic               we;        // write an index register
    logic [IDXR_W-1:0]  wr_reg;
    logic               wr_read;   // write source: operand 1 read data (1) or adder (0)
    logic               cmp_en;    // comparator output replaces the control bit
    logic [IDX_W-1:0]   cmp_lim;   // control bit = (adder sum < cmp_lim)
  } idx_ctrl_t;

  // ---------------------------------------------------------- functional units
  typedef enum logic [2:0] {FU_NONE, FU_ALU, FU_MUL, FU_MEM, FU_FP, FU_CSR} fu_e;

  typedef enum logic [4:0] {
    ALU_ADD, ALU_SUB, ALU_SLL, ALU_SRL, ALU_SRA, ALU_AND, ALU_OR, ALU_XOR,
    ALU_SEQ, ALU_SNE, ALU_SLT, ALU_SLTU, ALU_SGE, ALU_SGEU,
    ALU_MIN, ALU_MINU, ALU_MAX, ALU_MAXU, ALU_PASS1, ALU_PASS2
  } alu_fn_e;

  typedef enum logic [2:0] {XO_ALU, XO_POPC, XO_FIRST, XO_SBF, XO_SIF, XO_SOF} xout_e;
  typedef enum logic [2:0] {FX_NONE, FX_SAT_U, FX_SAT_S, FX_ROUND, FX_AVG_U, FX_AVG_S} fixp_e;

  typedef struct packed {
    alu_fn_e         fn;
    logic            xchg;      // exchange operand 1 and 2
    logic            inv2;      // invert operand 2 after exchange
    logic            invout;    // invert the result
    logic [1:0]      sh2;       // shift operand 2 left by 0..3
    logic            cin_ctrl;  // carry-in taken from the control bit (vadc/vsbc)
    logic            mout_cout; // mask output is carry/borrow out instead of compare
    xout_e           osel;
    fixp_e           fixp;
    logic            sel_mode;  // result = ctrl_bit ? main : alternative
    logic            alt_in2;   // alternative is operand 2 (else operand 1)
    logic            use_acc;
    logic            save_acc;
    logic [ACC_W-1:0] acc_idx;
    logic            first;     // first micro-op: clears the seen-1 flag
  } alu_ctrl_t;

  typedef enum logic [2:0] {MUL_MUL, MUL_MULH, MUL_MULHU, MUL_MULHSU, MUL_MACC, MUL_NMSAC, MUL_SMUL} mul_fn_e;
  typedef enum logic [2:0] {FP_ADD, FP_SUB, FP_MUL, FP_MACC, FP_MIN, FP_MAX} fp_fn_e;

  typedef struct packed {
    logic store;
    logic ff;        // fault-only-first
  } mem_ctrl_t;

  typedef enum logic [1:0] {AVL_RS1, AVL_UIMM, AVL_MAX, AVL_KEEP} avl_e;

  typedef struct packed {
    avl_e        avl;
    logic [4:0]  uimm;
    vtype_t      vtype;
    logic        vtype_from_rs2;
  } vset_ctrl_t;

  // ------------------------------------------------------------ micro-op
  typedef struct packed {
    logic             valid;
    logic             first;     // first micro-op of the instruction
    logic             last;      // last micro-op of the instruction
    logic [CNT_W-1:0] elem;      // element index (outer counter)
    fu_e              fu;
    src_t             src1;
    src_t             src2;
    src_t             src3;
    logic [4:0]       imm;
    logic             imm_unsigned;
    logic             skip;      // element below vstart: only the ALU state advances
    logic             mask_en;   // vm = 0: v0 bit of elem gates the micro-op
    logic             mask_sel;  // v0 bit is a data input (merge, carry), not a gate
    logic             mask_src2; // mask bit taken from the operand-2 register instead of v0
    logic             mdw_tail;  // build a 64-bit bit select from v0 and vl for this dword
    idx_ctrl_t        idx;
    wb_t              wb;
    alu_ctrl_t        alu;
    mul_fn_e          mul;
    fp_fn_e           fp;
    mem_ctrl_t        mem;
    vset_ctrl_t       vset;
    logic [4:0]       xrd;
  } uop_t;

  // RD tag: compact write request carried by long-latency units.
  typedef struct packed {
    logic            reduce;    // goes to the FP reduction queue
    logic            vwe;       // writes the vector register file
    logic [4:0]      vreg;
    logic [DW_W-1:0] dw;
    logic [2:0]      boff;
    sew_e            eew;
    logic [CNT_W-1:0] elem;
    logic            ff;
  } rdtag_t;
  localparam int RDTAG_W = $bits(rdtag_t);

  // ---------------------------------------------------------------- helpers
  function automatic int unsigned sew_bits(sew_e s);
    return 8 << s;
  endfunction

  // Location of element idx of a register group based at vreg with width eew.
  function automatic vreg_req_t elem_loc(logic [4:0] base, logic [CNT_W-1:0] idx, sew_e eew);
    logic [CNT_W+2:0] baddr;
    vreg_req_t r;
    baddr   = {3'b000, idx} << eew;
    r.valid = 1'b1;
    r.vreg  = base + 5'(baddr >> VLENB_W);
    r.dw    = baddr[VLENB_W-1:3];
    return r;
  endfunction

  function automatic opmanip_t elem_manip(logic [CNT_W-1:0] idx, sew_e eew, logic sext);
    logic [CNT_W+2:0] baddr;
    opmanip_t m;
    baddr  = {3'b000, idx} << eew;
    m.boff = baddr[2:0];
    m.eew  = eew;
    m.sext = sext;
    return m;
  endfunction

  // A vector source operand for element idx of group base.
  function automatic src_t vsrc(logic [4:0] base, logic [CNT_W-1:0] idx, sew_e eew, logic sext);
    src_t s;
    s          = '0;
    s.sel      = SRC_VREG;
    s.req      = elem_loc(base, idx, eew);
    s.manip    = elem_manip(idx, eew, sext);
    return s;
  endfunction

  function automatic src_t csrc(src_sel_e sel, sew_e eew, logic sext);
    src_t s;
    s            = '0;
    s.sel        = sel;
    s.manip.eew  = eew;
    s.manip.sext = sext;
    return s;
  endfunction

  function automatic wb_t wb_elem(logic [4:0] base, logic [CNT_W-1:0] idx, sew_e eew);
    wb_t w;
    w       = '0;
    w.mode  = WB_ELEM;
    w.req   = elem_loc(base, idx, eew);
    w.manip = elem_manip(idx, eew, 1'b0);
    return w;
  endfunction

  // Write one mask bit (element idx of a mask register).
  function automatic wb_t wb_mbit(logic [4:0] vd, logic [CNT_W-1:0] idx);
    wb_t w;
    w           = '0;
    w.mode      = WB_MBIT;
    w.req.valid = 1'b1;
    w.req.vreg  = vd;
    w.req.dw    = idx[DW_W+5:6];
    w.mbit      = idx[5:0];
    return w;
  endfunction

  // Write a whole mask double word, merged under the bit select.
  function automatic wb_t wb_mdw(logic [4:0] vd, logic [CNT_W-1:0] dwi);
    wb_t w;
    w           = '0;
    w.mode      = WB_MDW;
    w.req.valid = 1'b1;
    w.req.vreg  = vd;
    w.req.dw    = dwi[DW_W-1:0];
    return w;
  endfunction

  function automatic rdtag_t make_tag(wb_t w, logic [CNT_W-1:0] elem, logic ff);
    rdtag_t t;
    t.reduce = w.reduce;
    t.vwe    = (w.mode == WB_ELEM);
    t.vreg   = w.req.vreg;
    t.dw     = w.req.dw;
    t.boff   = w.manip.boff;
    t.eew    = w.manip.eew;
    t.elem   = elem;
    t.ff     = ff;
    return t;
  endfunction

  // Number of registers in a group for a vlmul encoding (fractional -> 1).
  function automatic logic [3:0] lmul_regs(logic [2:0] vlmul);
    case (vlmul)
      3'b001:  return 4'd2;
      3'b010:  return 4'd4;
      3'b011:  return 4'd8;
      default: return 4'd1;
    endcase
  endfunction

  // VLMAX = LMUL * VLEN / SEW.
  function automatic logic [VL_W-1:0] vlmax_of(vtype_t vt);
    int unsigned v;
    v = VLEN >> (vt.vsew + 3);
    case (vt.vlmul)
      3'b001: v = v << 1;
      3'b010: v = v << 2;
      3'b011: v = v << 3;
      3'b111: v = v >> 1;
      3'b110: v = v >> 2;
      3'b101: v = v >> 3;
      default: ;
    endcase
    return VL_W'(v);
  endfunction

endpackage
