// vdec_fp: decode module for vector floating-point arithmetic.
//
// Recognises vfadd, vfsub, vfmin, vfmax, vfmul, vfmacc (.vv and .vf) and the
// ordered and unordered sum reductions vfredosum/vfredusum, for SEW = 64.
// Element-wise instructions issue one FP micro-op per element with
// a = vs2, b = vs1 or f[rs1], c = vd. A reduction issues one micro-op per
// element, all in order: element 0 adds vs1[0] and vs2[0]; every later
// element takes the previous sum from the FP reduction queue (source reduce
// flag) and adds vs2[i]. Every result except the last goes back into the
// queue (write-back reduce flag); the last one is written to vd[0] through an
// RD tag. Both reductions are executed in element order.
//
// The reduction-queue scheme follows the document. Restricting FP to SEW = 64
// (double precision, the configuration's FPU width) and leaving out the
// reciprocal and square-root estimates are this design's limits.
// Purely combinational.
module vdec_fp
  import lem_pkg::*;
  import lem_ext_pkg::*;
  import vdec_pkg::*;
(
  input  ext_req_t  req,
  input  vcsr_t     csr,
  output vdec_sub_t sub
);

  vinstr_t  in;
  logic     is_vv, is_vf, red, hit;
  fp_fn_e   fn;
  logic [CNT_W-1:0] i;

  always_comb begin
    in    = vinstr_t'(req.instr);
    i     = req.outer;
    is_vv = in.opcode == OP_V && in.funct3 == F3_OPFVV;
    is_vf = in.opcode == OP_V && in.funct3 == F3_OPFVF;
    red = 1'b0; hit = 1'b0; fn = FP_ADD;
    if (is_vv || is_vf) begin
      unique case (in.funct6)
        6'b000000: begin hit = 1'b1; fn = FP_ADD; end
        6'b000010: begin hit = 1'b1; fn = FP_SUB; end
        6'b000100: begin hit = 1'b1; fn = FP_MIN; end
        6'b000110: begin hit = 1'b1; fn = FP_MAX; end
        6'b100100: begin hit = 1'b1; fn = FP_MUL; end
        6'b101100: begin hit = 1'b1; fn = FP_MACC; end
        6'b000001, 6'b000011: if (is_vv) begin hit = 1'b1; red = 1'b1; fn = FP_ADD; end
        default: ;
      endcase
    end

    sub = sub_none();
    sub.recognized = hit;
    sub.illegal    = (csr.vtype.vsew != 3'd3) || (red && csr.vstart != '0);
    sub.outer_init = red ? '0 : CNT_W'(csr.vstart);
    sub.outer_end  = CNT_W'(csr.vl);
    sub.grp_vs1    = red ? 4'd1 : lmul_regs(csr.vtype.vlmul);
    sub.grp_vs2    = lmul_regs(csr.vtype.vlmul);
    sub.grp_vd     = red ? 4'd1 : lmul_regs(csr.vtype.vlmul);
    sub.rd_vs1     = is_vv;
    sub.rd_vs2     = 1'b1;
    sub.rd_vd      = (fn == FP_MACC);
    sub.wr_vd      = 1'b1;

    sub.uop.valid   = 1'b1;
    sub.uop.elem    = i;
    sub.uop.fu      = FU_FP;
    sub.uop.fp      = fn;
    sub.uop.mask_en = !in.vm;
    sub.uop.src1    = vsrc(in.vs2, i, SEW64, 1'b0);
    sub.uop.src2    = is_vv ? vsrc(in.vs1, i, SEW64, 1'b0) : csrc(SRC_FREG, SEW64, 1'b0);
    sub.uop.src3    = vsrc(in.vd, i, SEW64, 1'b0);
    sub.uop.wb      = wb_elem(in.vd, i, SEW64);
    if (red) begin
      // a = running sum (vs1[0] or queue), b = vs2[i]; masked-off elements add -0.0
      sub.uop.mask_sel = !in.vm;
      sub.uop.src1     = vsrc(in.vs1, '0, SEW64, 1'b0);
      sub.uop.src1.reduce = (i != '0);
      sub.uop.src2     = vsrc(in.vs2, i, SEW64, 1'b0);
      if (i == CNT_W'(csr.vl) - 1'b1) sub.uop.wb = wb_elem(in.vd, '0, SEW64);
      else begin
        sub.uop.wb        = '0;
        sub.uop.wb.reduce = 1'b1;
      end
    end
    if (sub.uop.mask_en && !red && in.vd == 5'd0) sub.illegal = 1'b1;
  end

endmodule
