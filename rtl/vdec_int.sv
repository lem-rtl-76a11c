// vdec_int: decode module for vector integer arithmetic.
//
// Recognises OPIVV/OPIVX/OPIVI element-wise integer instructions (add, sub,
// reverse sub, min/max, logic, add/sub with carry, merge/move, integer
// compares, saturating add/sub, shifts and scaling shifts) and, from the
// OPMVV/OPMVX space, single-width integer reductions, 64-bit-at-a-time mask
// logical instructions and the multiply / multiply-add family.
//
// Each row of the decode table is a transformation of a small control bundle
// (ALU function, exchange, signedness, kind of result). Element-wise
// instructions run the outer counter over elements vstart..vl-1 with one
// micro-op per element. Reductions run over 0..vl-1 and keep the running
// value in accumulator 0; only the last micro-op writes vd[0]. Mask logical
// instructions run over the vl/64 double words and merge whole 64-bit words.
// Compares write single mask bits. Operand 1 of the ALU is vs1/rs1/imm and
// operand 2 is vs2; instructions of the form vs2 op x set the exchange bit.
// The multiplier gets vs2 (or vd for vmadd/vnmsub) and vs1/rs1.
//
// The grouping of instructions into this module follows the document; the
// table format (one case per funct6 instead of region/line/subline rows) and
// all encodings of the control bundle are this design's choices.
// Purely combinational.
module vdec_int
  import lem_pkg::*;
  import lem_ext_pkg::*;
  import vdec_pkg::*;
(
  input  ext_req_t        req,
  input  vcsr_t           csr,
  output vdec_sub_t       sub
);

  typedef enum logic [2:0] {K_NONE, K_ELEM, K_MASK, K_RED, K_MLOG, K_MUL} kind_e;

  vinstr_t   in;
  sew_e      sew;
  kind_e     kind;
  alu_ctrl_t a;
  logic      sx;          // sign-extend operands
  logic      uimm;        // unsigned immediate
  logic      is_vv, is_vx, is_vi, is_mvv, is_mvx;
  logic      carry_op;    // vadc/vsbc/vmadc/vmsbc use v0 as data
  logic      merge_op;
  mul_fn_e   mfn;
  logic      mul_vd_src;  // vmadd/vnmsub: multiplicand is vd
  logic [CNT_W-1:0] i;

  always_comb begin
    in     = vinstr_t'(req.instr);
    sew    = sew_e'(csr.vtype.vsew[1:0]);
    is_vv  = in.opcode == OP_V && in.funct3 == F3_OPIVV;
    is_vx  = in.opcode == OP_V && in.funct3 == F3_OPIVX;
    is_vi  = in.opcode == OP_V && in.funct3 == F3_OPIVI;
    is_mvv = in.opcode == OP_V && in.funct3 == F3_OPMVV;
    is_mvx = in.opcode == OP_V && in.funct3 == F3_OPMVX;
    i      = req.outer;

    // ---------------------------------------------------------- decode table
    kind = K_NONE; a = '0; a.fn = ALU_ADD; a.osel = XO_ALU; a.fixp = FX_NONE;
    sx = 1'b1; uimm = 1'b0; carry_op = 1'b0; merge_op = 1'b0;
    mfn = MUL_MUL; mul_vd_src = 1'b0;
    if (is_vv || is_vx || is_vi) begin
      unique casez (in.funct6)
        6'b000000: begin kind = K_ELEM; a.fn = ALU_ADD; end
        6'b000010: if (!is_vi) begin kind = K_ELEM; a.fn = ALU_SUB; a.xchg = 1'b1; end
        6'b000011: if (!is_vv) begin kind = K_ELEM; a.fn = ALU_SUB; end
        6'b000100: if (!is_vi) begin kind = K_ELEM; a.fn = ALU_MINU; sx = 1'b0; end
        6'b000101: if (!is_vi) begin kind = K_ELEM; a.fn = ALU_MIN; end
        6'b000110: if (!is_vi) begin kind = K_ELEM; a.fn = ALU_MAXU; sx = 1'b0; end
        6'b000111: if (!is_vi) begin kind = K_ELEM; a.fn = ALU_MAX; end
        6'b001001: begin kind = K_ELEM; a.fn = ALU_AND; end
        6'b001010: begin kind = K_ELEM; a.fn = ALU_OR;  end
        6'b001011: begin kind = K_ELEM; a.fn = ALU_XOR; end
        6'b010000: if (!in.vm) begin kind = K_ELEM; a.fn = ALU_ADD; carry_op = 1'b1; end
        6'b010001: begin kind = K_MASK; a.fn = ALU_ADD; a.mout_cout = 1'b1; carry_op = !in.vm; sx = 1'b0; end
        6'b010010: if (!in.vm && !is_vi) begin kind = K_ELEM; a.fn = ALU_SUB; a.xchg = 1'b1; carry_op = 1'b1; end
        6'b010011: if (!is_vi) begin kind = K_MASK; a.fn = ALU_SUB; a.xchg = 1'b1; a.mout_cout = 1'b1; carry_op = !in.vm; sx = 1'b0; end
        6'b010111: if (in.vm ? (in.vs2 == 5'd0) : 1'b1) begin kind = K_ELEM; a.fn = ALU_PASS1; merge_op = !in.vm; end
        6'b011000: begin kind = K_MASK; a.fn = ALU_SEQ; end
        6'b011001: begin kind = K_MASK; a.fn = ALU_SNE; end
        6'b011010: if (!is_vi) begin kind = K_MASK; a.fn = ALU_SLTU; a.xchg = 1'b1; sx = 1'b0; end
        6'b011011: if (!is_vi) begin kind = K_MASK; a.fn = ALU_SLT;  a.xchg = 1'b1; end
        6'b011100: begin kind = K_MASK; a.fn = ALU_SGEU; sx = 1'b0; end
        6'b011101: begin kind = K_MASK; a.fn = ALU_SGE;  end
        6'b011110: if (!is_vv) begin kind = K_MASK; a.fn = ALU_SLTU; sx = 1'b0; end
        6'b011111: if (!is_vv) begin kind = K_MASK; a.fn = ALU_SLT;  end
        6'b100000: begin kind = K_ELEM; a.fn = ALU_ADD; a.fixp = FX_SAT_U; sx = 1'b0; end
        6'b100001: begin kind = K_ELEM; a.fn = ALU_ADD; a.fixp = FX_SAT_S; end
        6'b100010: if (!is_vi) begin kind = K_ELEM; a.fn = ALU_SUB; a.xchg = 1'b1; a.fixp = FX_SAT_U; sx = 1'b0; end
        6'b100011: if (!is_vi) begin kind = K_ELEM; a.fn = ALU_SUB; a.xchg = 1'b1; a.fixp = FX_SAT_S; end
        6'b100111: if (!is_vi) begin kind = K_MUL; mfn = MUL_SMUL; end
        6'b100101: begin kind = K_ELEM; a.fn = ALU_SLL; a.xchg = 1'b1; uimm = 1'b1; sx = 1'b0; end
        6'b101000: begin kind = K_ELEM; a.fn = ALU_SRL; a.xchg = 1'b1; uimm = 1'b1; sx = 1'b0; end
        6'b101001: begin kind = K_ELEM; a.fn = ALU_SRA; a.xchg = 1'b1; uimm = 1'b1; end
        6'b101010: begin kind = K_ELEM; a.fn = ALU_SRL; a.xchg = 1'b1; uimm = 1'b1; sx = 1'b0; a.fixp = FX_ROUND; end
        6'b101011: begin kind = K_ELEM; a.fn = ALU_SRA; a.xchg = 1'b1; uimm = 1'b1; a.fixp = FX_ROUND; end
        default: ;
      endcase
    end else if (is_mvv || is_mvx) begin
      unique casez (in.funct6)
        6'b000000: if (is_mvv) begin kind = K_RED; a.fn = ALU_ADD; end
        6'b000001: if (is_mvv) begin kind = K_RED; a.fn = ALU_AND; end
        6'b000010: if (is_mvv) begin kind = K_RED; a.fn = ALU_OR;  end
        6'b000011: if (is_mvv) begin kind = K_RED; a.fn = ALU_XOR; end
        6'b000100: if (is_mvv) begin kind = K_RED; a.fn = ALU_MINU; sx = 1'b0; end
        6'b000101: if (is_mvv) begin kind = K_RED; a.fn = ALU_MIN;  end
        6'b000110: if (is_mvv) begin kind = K_RED; a.fn = ALU_MAXU; sx = 1'b0; end
        6'b000111: if (is_mvv) begin kind = K_RED; a.fn = ALU_MAX;  end
        6'b001000: begin kind = K_ELEM; a.fn = ALU_ADD; a.fixp = FX_AVG_U; sx = 1'b0; end
        6'b001001: begin kind = K_ELEM; a.fn = ALU_ADD; a.fixp = FX_AVG_S; end
        6'b001010: begin kind = K_ELEM; a.fn = ALU_SUB; a.xchg = 1'b1; a.fixp = FX_AVG_U; sx = 1'b0; end
        6'b001011: begin kind = K_ELEM; a.fn = ALU_SUB; a.xchg = 1'b1; a.fixp = FX_AVG_S; end
        6'b011000: if (is_mvv && in.vm) begin kind = K_MLOG; a.fn = ALU_AND; a.xchg = 1'b1; a.inv2 = 1'b1; end
        6'b011001: if (is_mvv && in.vm) begin kind = K_MLOG; a.fn = ALU_AND; end
        6'b011010: if (is_mvv && in.vm) begin kind = K_MLOG; a.fn = ALU_OR;  end
        6'b011011: if (is_mvv && in.vm) begin kind = K_MLOG; a.fn = ALU_XOR; end
        6'b011100: if (is_mvv && in.vm) begin kind = K_MLOG; a.fn = ALU_OR;  a.xchg = 1'b1; a.inv2 = 1'b1; end
        6'b011101: if (is_mvv && in.vm) begin kind = K_MLOG; a.fn = ALU_AND; a.invout = 1'b1; end
        6'b011110: if (is_mvv && in.vm) begin kind = K_MLOG; a.fn = ALU_OR;  a.invout = 1'b1; end
        6'b011111: if (is_mvv && in.vm) begin kind = K_MLOG; a.fn = ALU_XOR; a.invout = 1'b1; end
        6'b100100: begin kind = K_MUL; mfn = MUL_MULHU;  sx = 1'b0; end
        6'b100101: begin kind = K_MUL; mfn = MUL_MUL;    end
        6'b100110: begin kind = K_MUL; mfn = MUL_MULHSU; end
        6'b100111: begin kind = K_MUL; mfn = MUL_MULH;   end
        6'b101001: begin kind = K_MUL; mfn = MUL_MACC;   mul_vd_src = 1'b1; end
        6'b101011: begin kind = K_MUL; mfn = MUL_NMSAC;  mul_vd_src = 1'b1; end
        6'b101101: begin kind = K_MUL; mfn = MUL_MACC;   end
        6'b101111: begin kind = K_MUL; mfn = MUL_NMSAC;  end
        default: ;
      endcase
    end

    // ---------------------------------------------------------- sequencing
    sub = sub_none();
    sub.recognized = (kind != K_NONE);
    sub.outer_init = CNT_W'(csr.vstart);
    sub.outer_end  = CNT_W'(csr.vl);
    sub.grp_vs1    = lmul_regs(csr.vtype.vlmul);
    sub.grp_vs2    = lmul_regs(csr.vtype.vlmul);
    sub.grp_vd     = lmul_regs(csr.vtype.vlmul);
    sub.rd_vs1     = is_vv || is_mvv;
    sub.rd_vs2     = 1'b1;
    sub.wr_vd      = 1'b1;

    sub.uop.valid = 1'b1;
    sub.uop.elem  = i;
    sub.uop.fu    = FU_ALU;
    sub.uop.imm   = in.vs1;
    sub.uop.imm_unsigned = uimm;
    sub.uop.mask_en = !in.vm;
    sub.uop.alu   = a;
    sub.uop.mul   = mfn;

    // operand 1: vs1 / rs1 / imm; operand 2: vs2
    if (is_vv || is_mvv) sub.uop.src1 = vsrc(in.vs1, i, sew, sx);
    else if (is_vi)      sub.uop.src1 = csrc(SRC_IMM, sew, sx);
    else                 sub.uop.src1 = csrc(SRC_XREG, sew, sx);
    sub.uop.src2 = vsrc(in.vs2, i, sew, sx);
    sub.uop.wb   = wb_elem(in.vd, i, sew);

    if (carry_op) begin
      sub.uop.mask_en     = 1'b1;
      sub.uop.mask_sel    = 1'b1;
      sub.uop.alu.cin_ctrl = 1'b1;
    end
    if (merge_op) begin
      sub.uop.mask_en      = 1'b1;
      sub.uop.mask_sel     = 1'b1;
      sub.uop.alu.sel_mode = 1'b1;
      sub.uop.alu.alt_in2  = 1'b1;
    end

    unique case (kind)
      K_MASK: begin
        sub.uop.wb    = wb_mbit(in.vd, i);
        sub.grp_vd    = 4'd1;
        sub.mask_dest = 1'b1;
      end
      K_RED: begin
        // vd[0] = vs1[0] op vs2[0] op ... ; masked-off elements pass the
        // running value through the control-bit mux
        sub.outer_init       = '0;
        sub.uop.src1         = vsrc(in.vs1, '0, sew, sx);
        sub.uop.alu.use_acc  = (i != '0);
        sub.uop.alu.save_acc = 1'b1;
        sub.uop.alu.sel_mode = !in.vm;
        sub.uop.alu.alt_in2  = 1'b0;
        sub.uop.mask_sel     = !in.vm;
        sub.uop.wb           = (i == CNT_W'(csr.vl) - 1'b1) ? wb_elem(in.vd, '0, sew) : '0;
        sub.grp_vs1          = 4'd1;
        sub.grp_vd           = 4'd1;
        sub.illegal          = (csr.vstart != '0);
      end
      K_MLOG: begin
        sub.outer_init   = '0;
        sub.outer_end    = ndw(csr.vl);
        sub.uop.elem     = {i[CNT_W-7:0], 6'd0};
        sub.uop.src1     = vsrc(in.vs1, '0, SEW64, 1'b0);
        sub.uop.src1.req.dw = i[DW_W-1:0];
        sub.uop.src2     = vsrc(in.vs2, '0, SEW64, 1'b0);
        sub.uop.src2.req.dw = i[DW_W-1:0];
        sub.uop.mdw_tail = 1'b1;
        sub.uop.wb       = wb_mdw(in.vd, i);
        sub.grp_vs1 = 4'd1; sub.grp_vs2 = 4'd1; sub.grp_vd = 4'd1;
        sub.mask_dest = 1'b1;
      end
      K_MUL: begin
        sub.uop.fu   = FU_MUL;
        sub.uop.src3 = vsrc(in.vd, i, sew, sx);
        sub.rd_vd    = mfn inside {MUL_MACC, MUL_NMSAC};
        if (mul_vd_src) begin
          sub.uop.src1 = vsrc(in.vd, i, sew, sx);
          sub.uop.src3 = vsrc(in.vs2, i, sew, sx);
        end else begin
          sub.uop.src1 = vsrc(in.vs2, i, sew, sx);
        end
        // operand 2 is vs1 or rs1; for vmulhsu it is the unsigned one
        if (is_mvv || is_vv) sub.uop.src2 = vsrc(in.vs1, i, sew, sx && mfn != MUL_MULHSU);
        else        sub.uop.src2 = csrc(SRC_XREG, sew, sx && mfn != MUL_MULHSU);
      end
      default: ;
    endcase
    if (sub.uop.mask_en && !sub.mask_dest && in.vd == 5'd0 && kind != K_RED) sub.illegal = 1'b1;
    sub.uop.xrd = in.vd;
  end

endmodule
