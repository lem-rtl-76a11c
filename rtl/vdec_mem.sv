// vdec_mem: decode module for vector loads and stores.
//
// Recognises unit-stride (including fault-only-first), strided and indexed
// (ordered and unordered) loads and stores with one field (nf = 0). One
// micro-op per element, elements 0..vl-1; elements below vstart are issued
// with the skip flag so that only the address accumulator advances.
// Addresses are formed in the ALU:
//  * unit stride: element 0 takes rs1 and saves it in accumulator 0; each
//    later element adds the constant 1, pre-shifted by log2(EEW/8), to the
//    accumulator;
//  * strided: the first micro-op takes rs1, later ones add rs2 to the
//    accumulator;
//  * indexed: rs1 + the zero-extended index element of vs2.
// Loads write back through the RD tag of the long-latency write port; stores
// read the data element from vs3 (the vd field).
//
// The accumulator-based address generation with the constant 1 before the
// pre-shift follows the document; segment accesses, whole-register and mask
// loads/stores are not decoded (illegal), which is this design's limit.
// Purely combinational.
module vdec_mem
  import lem_pkg::*;
  import lem_ext_pkg::*;
  import vdec_pkg::*;
(
  input  ext_req_t  req,
  input  vcsr_t     csr,
  output vdec_sub_t sub
);

  vinstr_t    in;
  logic       is_ld, is_st, width_ok, indexed, strided, ff;
  logic [1:0] mop;
  sew_e       sew, weew, deew;
  logic [CNT_W-1:0] i;
  logic [3:0] lm, emul_d, emul_i;

  function automatic logic [3:0] emul(logic [3:0] lmr, sew_e e, sew_e s);
    int signed d;
    int unsigned r;
    d = int'(e) - int'(s);
    r = (d >= 0) ? (int'(lmr) << d) : (int'(lmr) >> (-d));
    return (r == 0) ? 4'd1 : ((r > 8) ? 4'd8 : 4'(r));
  endfunction

  always_comb begin
    in    = vinstr_t'(req.instr);
    i     = req.outer;
    sew   = sew_e'(csr.vtype.vsew[1:0]);
    lm    = lmul_regs(csr.vtype.vlmul);
    is_ld = in.opcode == OP_LOADFP;
    is_st = in.opcode == OP_STOREFP;
    mop   = in.funct6[1:0];
    unique case (in.funct3)
      3'b000:  begin weew = SEW8;  width_ok = 1'b1; end
      3'b101:  begin weew = SEW16; width_ok = 1'b1; end
      3'b110:  begin weew = SEW32; width_ok = 1'b1; end
      3'b111:  begin weew = SEW64; width_ok = 1'b1; end
      default: begin weew = SEW8;  width_ok = 1'b0; end
    endcase
    indexed = mop[0];
    strided = (mop == 2'b10);
    ff      = is_ld && mop == 2'b00 && in.vs2 == 5'b10000;
    deew    = indexed ? sew : weew;
    emul_d  = emul(lm, deew, sew);
    emul_i  = emul(lm, weew, sew);

    sub = sub_none();
    sub.recognized = (is_ld || is_st) && width_ok;
    // nf != 0, mew, whole-register and mask variants are not supported
    sub.illegal = (in.funct6[5:2] != 4'b0000) ||
                  (mop == 2'b00 && !(in.vs2 == 5'b00000 || ff));
    sub.outer_init = '0;
    sub.outer_end  = CNT_W'(csr.vl);
    sub.rd_vs2     = indexed;
    sub.grp_vs2    = emul_i;
    sub.rd_vd      = is_st;
    sub.wr_vd      = is_ld;
    sub.grp_vd     = emul_d;

    sub.uop.valid   = 1'b1;
    sub.uop.elem    = i;
    sub.uop.fu      = FU_MEM;
    sub.uop.skip    = (i < CNT_W'(csr.vstart));
    sub.uop.mask_en = !in.vm;
    sub.uop.mem.store = is_st;
    sub.uop.mem.ff    = ff;
    sub.uop.alu.fn    = ALU_ADD;
    sub.uop.alu.acc_idx = '0;

    if (indexed) begin
      sub.uop.src1 = csrc(SRC_XREG, SEW64, 1'b0);
      sub.uop.src2 = vsrc(in.vs2, i, weew, 1'b0);
    end else if (strided) begin
      sub.uop.src1         = csrc(SRC_XREG, SEW64, 1'b0);
      sub.uop.src2         = (i == '0) ? csrc(SRC_ZERO, SEW64, 1'b0) : csrc(SRC_XREG2, SEW64, 1'b0);
      sub.uop.alu.use_acc  = (i != '0);
      sub.uop.alu.save_acc = 1'b1;
    end else begin
      sub.uop.src1         = csrc(SRC_XREG, SEW64, 1'b0);
      sub.uop.src2         = (i == '0) ? csrc(SRC_ZERO, SEW64, 1'b0) : csrc(SRC_ONE, SEW64, 1'b0);
      sub.uop.alu.sh2      = 2'(weew);
      sub.uop.alu.use_acc  = (i != '0);
      sub.uop.alu.save_acc = 1'b1;
    end

    if (is_st) sub.uop.src3 = vsrc(in.vd, i, deew, 1'b0);
    if (is_ld) sub.uop.wb   = wb_elem(in.vd, i, deew);
    if (sub.uop.mask_en && is_ld && in.vd == 5'd0) sub.illegal = 1'b1;
  end

endmodule
