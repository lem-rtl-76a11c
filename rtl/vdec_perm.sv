// vdec_perm: decode module for permutations and scalar-destination
// instructions.
//
// Uses the index registers, index adder and index comparator of the register
// file:
//  * vrgather.vv: two micro-ops per element (inner counter 0/1). The first
//    loads index register 0 from vs1[i]; the second reads vs2 at that index
//    and writes vd[i], or 0 when the comparator finds the index >= VLMAX.
//  * vrgather.vx/.vi, vslidedown.vx/.vi: one micro-op per element; the adder
//    forms i + offset (or the scalar index), the comparator checks it against
//    VLMAX, and vs2 is read at the sum.
//  * vslideup.vx/.vi: the outer counter starts at max(vstart, offset); vs2 is
//    read at i - offset.
//  * viota.m: index register 0 counts the set mask bits of vs2 seen so far
//    (adder input B is the mask bit); its old value is written to vd[i].
//  * vid.v: writes the element index.
//  * vmv.x.s / vmv.s.x: move element 0 to or from x[rd]/x[rs1].
//  * vcpop.m / vfirst.m: one micro-op per 64-bit mask word, the ALU's
//    population count / find-first unit and accumulator 0; the last word's
//    micro-op writes x[rd].
//  * vmsbf.m / vmsif.m / vmsof.m: one micro-op per mask word through the ALU's
//    set-before/including/only-first logic with its seen-1 flag.
// The component set (index registers, adder, comparator) and the grouping of
// instructions follow the document; the micro-op sequences are this design's.
// Purely combinational.
module vdec_perm
  import lem_pkg::*;
  import lem_ext_pkg::*;
  import vdec_pkg::*;
(
  input  ext_req_t        req,
  input  vcsr_t           csr,
  input  logic [XLEN-1:0] xval,
  output vdec_sub_t       sub
);

  typedef enum logic [3:0] {
    P_NONE, P_GATHER_VV, P_GATHER_X, P_SLDOWN, P_SLUP, P_IOTA, P_ID,
    P_MVXS, P_MVSX, P_CPOP, P_FIRST, P_MSXF
  } pk_e;

  vinstr_t          in;
  pk_e              k;
  sew_e             sew;
  logic             is_ivv, is_ivx, is_ivi, is_mvv, is_mvx;
  logic [CNT_W-1:0] i, nw;
  logic [IDX_W-1:0] off, vlmax_i;
  logic [VL_W-1:0]  vlmax;
  xout_e            xo;

  always_comb begin
    in     = vinstr_t'(req.instr);
    i      = req.outer;
    sew    = sew_e'(csr.vtype.vsew[1:0]);
    vlmax  = vlmax_of(csr.vtype);
    vlmax_i = IDX_W'(vlmax);
    is_ivv = in.opcode == OP_V && in.funct3 == F3_OPIVV;
    is_ivx = in.opcode == OP_V && in.funct3 == F3_OPIVX;
    is_ivi = in.opcode == OP_V && in.funct3 == F3_OPIVI;
    is_mvv = in.opcode == OP_V && in.funct3 == F3_OPMVV;
    is_mvx = in.opcode == OP_V && in.funct3 == F3_OPMVX;
    // offset / scalar index, saturated so that i + off cannot wrap
    if (is_ivi)                     off = IDX_W'(in.vs1);
    else if (xval >= XLEN'(16'h4000)) off = IDX_W'(16'h4000);
    else                            off = IDX_W'(xval);
    nw = ndw(csr.vl);

    k = P_NONE; xo = XO_ALU;
    if (is_ivv || is_ivx || is_ivi) begin
      unique case (in.funct6)
        6'b001100: k = is_ivv ? P_GATHER_VV : P_GATHER_X;
        6'b001110: if (!is_ivv) k = P_SLUP;
        6'b001111: if (!is_ivv) k = P_SLDOWN;
        default: ;
      endcase
    end else if (is_mvv && in.funct6 == 6'b010000) begin
      unique case (in.vs1)
        5'b00000: k = P_MVXS;
        5'b10000: k = P_CPOP;
        5'b10001: k = P_FIRST;
        default: ;
      endcase
    end else if (is_mvx && in.funct6 == 6'b010000 && in.vs2 == 5'd0) begin
      k = P_MVSX;
    end else if (is_mvv && in.funct6 == 6'b010100) begin
      unique case (in.vs1)
        5'b00001: begin k = P_MSXF; xo = XO_SBF; end
        5'b00010: begin k = P_MSXF; xo = XO_SOF; end
        5'b00011: begin k = P_MSXF; xo = XO_SIF; end
        5'b10000: k = P_IOTA;
        5'b10001: k = P_ID;
        default: ;
      endcase
    end

    sub = sub_none();
    sub.recognized = (k != P_NONE);
    sub.outer_init = CNT_W'(csr.vstart);
    sub.outer_end  = CNT_W'(csr.vl);
    sub.grp_vs1    = lmul_regs(csr.vtype.vlmul);
    sub.grp_vs2    = lmul_regs(csr.vtype.vlmul);
    sub.grp_vd     = lmul_regs(csr.vtype.vlmul);
    sub.rd_vs2     = 1'b1;
    sub.wr_vd      = 1'b1;

    sub.uop.valid   = 1'b1;
    sub.uop.elem    = i;
    sub.uop.fu      = FU_ALU;
    sub.uop.mask_en = !in.vm;
    sub.uop.imm     = in.vs1;
    sub.uop.imm_unsigned = 1'b1;
    sub.uop.alu.fn  = ALU_PASS2;
    sub.uop.src1    = csrc(SRC_ZERO, sew, 1'b0);
    sub.uop.src2    = vsrc(in.vs2, i, sew, 1'b0);
    sub.uop.src2.by_index = 1'b1;
    sub.uop.wb      = wb_elem(in.vd, i, sew);
    sub.uop.xrd     = in.vd;
    sub.uop.idx.a_sel = IA_DEC;
    sub.uop.idx.b_sel = IA_DEC;
    sub.uop.idx.a_val = IDX_W'(i);

    unique case (k)
      P_GATHER_VV: begin
        sub.rd_vs1     = 1'b1;
        sub.no_overlap = 1'b1;
        sub.inner_end  = CNT_W'(2);
        if (req.inner == '0) begin
          sub.uop.fu          = FU_NONE;
          sub.uop.src1        = vsrc(in.vs1, i, sew, 1'b0);
          sub.uop.wb          = '0;
          sub.uop.idx.we      = 1'b1;
          sub.uop.idx.wr_reg  = '0;
          sub.uop.idx.wr_read = 1'b1;
          sub.uop.src2.by_index = 1'b0;
        end else begin
          sub.uop.idx.a_sel    = IA_IDXREG;
          sub.uop.idx.a_reg    = '0;
          sub.uop.idx.b_val    = '0;
          sub.uop.idx.cmp_en   = 1'b1;
          sub.uop.idx.cmp_lim  = vlmax_i;
          sub.uop.alu.sel_mode = 1'b1;
        end
      end
      P_GATHER_X: begin
        sub.no_overlap       = 1'b1;
        sub.uop.idx.a_val    = off;
        sub.uop.idx.cmp_en   = 1'b1;
        sub.uop.idx.cmp_lim  = vlmax_i;
        sub.uop.alu.sel_mode = 1'b1;
      end
      P_SLDOWN: begin
        sub.uop.idx.b_val    = off;
        sub.uop.idx.cmp_en   = 1'b1;
        sub.uop.idx.cmp_lim  = vlmax_i;
        sub.uop.alu.sel_mode = 1'b1;
      end
      P_SLUP: begin
        sub.no_overlap    = 1'b1;
        sub.outer_init    = (CNT_W'(csr.vstart) > CNT_W'(off)) ? CNT_W'(csr.vstart) : CNT_W'(off);
        sub.uop.idx.b_val = -off;
      end
      P_IOTA: begin
        sub.no_overlap      = 1'b1;
        sub.grp_vs2         = 4'd1;
        sub.outer_init      = '0;
        sub.illegal         = (csr.vstart != '0);
        sub.uop.src1        = csrc(SRC_IDX, sew, 1'b0);
        sub.uop.src2.by_index = 1'b0;
        sub.uop.alu.fn      = ALU_PASS1;
        sub.uop.idx.a_sel   = (i == '0) ? IA_DEC : IA_IDXREG;
        sub.uop.idx.a_val   = '0;
        sub.uop.idx.a_reg   = '0;
        sub.uop.idx.b_sel   = IA_MASKBIT;
        sub.uop.idx.we      = 1'b1;
        sub.uop.idx.wr_reg  = '0;
      end
      P_ID: begin
        sub.rd_vs2          = 1'b0;
        sub.uop.src1        = csrc(SRC_ELEM, sew, 1'b0);
        sub.uop.src2.by_index = 1'b0;
        sub.uop.alu.fn      = ALU_PASS1;
      end
      P_MVXS: begin
        sub.wr_vd           = 1'b0;
        sub.grp_vs2         = 4'd1;
        sub.outer_init      = '0;
        sub.outer_end       = CNT_W'(1);
        sub.uop.mask_en     = 1'b0;
        sub.uop.src2        = vsrc(in.vs2, '0, sew, 1'b1);
        sub.uop.wb          = '0;
        sub.uop.wb.xreg     = 1'b1;
        sub.illegal         = !in.vm;
      end
      P_MVSX: begin
        sub.rd_vs2          = 1'b0;
        sub.grp_vd          = 4'd1;
        sub.outer_init      = '0;
        sub.outer_end       = (csr.vl != '0 && csr.vstart < csr.vl) ? CNT_W'(1) : '0;
        sub.uop.mask_en     = 1'b0;
        sub.uop.src1        = csrc(SRC_XREG, sew, 1'b0);
        sub.uop.src2.by_index = 1'b0;
        sub.uop.alu.fn      = ALU_PASS1;
        sub.uop.wb          = wb_elem(in.vd, '0, sew);
        sub.illegal         = !in.vm;
      end
      P_CPOP, P_FIRST, P_MSXF: begin
        sub.grp_vs2          = 4'd1;
        sub.grp_vd           = 4'd1;
        sub.outer_init       = '0;
        sub.outer_end        = (k == P_MSXF || nw != '0) ? nw : CNT_W'(1);
        sub.uop.elem         = {i[CNT_W-7:0], 6'd0};
        sub.uop.mdw_tail     = 1'b1;
        sub.uop.src1         = csrc(SRC_ELEM, SEW64, 1'b0);
        sub.uop.src2         = vsrc(in.vs2, '0, SEW64, 1'b0);
        sub.uop.src2.req.dw  = i[DW_W-1:0];
        sub.uop.alu.first    = (i == '0);
        sub.uop.alu.acc_idx  = '0;
        if (k == P_MSXF) begin
          sub.no_overlap      = 1'b1;
          sub.uop.alu.osel    = xo;
          sub.uop.wb          = wb_mdw(in.vd, i);
          sub.illegal         = (csr.vstart != '0);
        end else begin
          sub.wr_vd            = 1'b0;
          sub.uop.alu.osel     = (k == P_CPOP) ? XO_POPC : XO_FIRST;
          sub.uop.alu.save_acc = 1'b1;
          sub.uop.wb           = '0;
          sub.uop.wb.xreg      = (i + 1'b1 >= sub.outer_end);
        end
      end
      default: ;
    endcase
  end

endmodule
