// vdec_vsetvl: decode module for vsetvli, vsetivli and vsetvl.
//
// Produces a single FU_CSR micro-op that carries the AVL choice and the new
// vtype. The vector CSR block executes it when it issues and returns the new
// vl, which is written to rd. AVL selection follows the RISC-V V rules:
// rs1 != x0 uses x[rs1]; rs1 = x0 and rd != x0 asks for VLMAX; both x0 keep
// the current vl; vsetivli takes the 5-bit immediate. vtype comes from the
// immediate or, for vsetvl, from x[rs2]; reserved vtype bits make it illegal
// (vill). This module does not need a legal vtype itself.
// Its place as a separate decode module follows the document; the rest is
// this design's choice. Purely combinational.
module vdec_vsetvl
  import lem_pkg::*;
  import lem_ext_pkg::*;
  import vdec_pkg::*;
(
  input  ext_req_t  req,
  output vdec_sub_t sub
);

  vinstr_t in;
  logic    is_cfg, is_vli, is_ivli, is_vl;

  always_comb begin
    in      = vinstr_t'(req.instr);
    is_cfg  = in.opcode == OP_V && in.funct3 == F3_OPCFG;
    is_vli  = is_cfg && !req.instr[31];
    is_ivli = is_cfg && req.instr[31:30] == 2'b11;
    is_vl   = is_cfg && req.instr[31:25] == 7'b1000000;

    sub = sub_none();
    sub.needs_vtype = 1'b0;
    sub.recognized  = is_vli || is_ivli || is_vl;
    sub.outer_init  = '0;
    sub.outer_end   = CNT_W'(1);
    sub.wr_vd       = 1'b0;

    sub.uop.valid = 1'b1;
    sub.uop.fu    = FU_CSR;
    sub.uop.xrd   = in.vd;
    sub.uop.wb.xreg = (in.vd != 5'd0);
    sub.uop.vset.uimm  = in.vs1;
    sub.uop.vset.vtype = vtype_t'(req.instr[27:20]);
    sub.uop.vset.vtype.vill = is_ivli ? (req.instr[29:28] != 2'b00) : (req.instr[30:28] != 3'b000);
    sub.uop.vset.vtype_from_rs2 = is_vl;
    if (is_ivli)               sub.uop.vset.avl = AVL_UIMM;
    else if (in.vs1 != 5'd0)   sub.uop.vset.avl = AVL_RS1;
    else if (in.vd != 5'd0)    sub.uop.vset.avl = AVL_MAX;
    else                       sub.uop.vset.avl = AVL_KEEP;
  end

endmodule
