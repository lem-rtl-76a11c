// vdec_common: the vector decoder extension of the LEM expander
// (common decode logic for all vector instructions).
//
// Instantiates the five vector decode modules (memory, integer, FP,
// permutation/scalar-destination, vsetvl), picks the one that recognises the
// instruction, and adds the checks they share:
//  * register-group alignment of vd, vs1 and vs2 for the group sizes the
//    module reports;
//  * forbidden overlaps: for modules that flag it, vd's group may not overlap
//    the vs1/vs2 groups; a masked instruction with a non-mask destination may
//    not write v0;
//  * instructions other than vsetvl are illegal while vtype.vill is set;
//  * the scoreboard bitmap (sboard_check) of all registers read or written,
//    v0 included when masked. The prepare phase waits (wait_hazard) until the
//    scoreboard reports all of them clear.
// Towards the expander it is a single extension with the standard response.
// The functions listed above follow the document; the exact overlap rule set
// is a subset of the RISC-V V rules and is this design's choice.
// Purely combinational.
module vdec_common
  import lem_pkg::*;
  import lem_ext_pkg::*;
  import vdec_pkg::*;
(
  input  ext_req_t        req,
  input  vcsr_t           csr,
  input  logic [XLEN-1:0] in_rs1,
  input  logic [XLEN-1:0] cur_rs1,
  input  logic            sboard_clear,
  output logic [31:0]     sboard_check,
  output ext_resp_t       resp
);

  localparam int NSUB = 5;
  vdec_sub_t s [NSUB];
  vdec_sub_t h;
  vinstr_t   in;
  logic [XLEN-1:0] xval;

  assign xval = req.busy ? cur_rs1 : in_rs1;

  vdec_mem    u_mem  (.req(req), .csr(csr), .sub(s[0]));
  vdec_int    u_int  (.req(req), .csr(csr), .sub(s[1]));
  vdec_fp     u_fp   (.req(req), .csr(csr), .sub(s[2]));
  vdec_perm   u_perm (.req(req), .csr(csr), .xval(xval), .sub(s[3]));
  vdec_vsetvl u_vset (.req(req), .sub(s[4]));

  function automatic logic [31:0] grp_bits(logic [4:0] base, logic [3:0] n);
    logic [31:0] m;
    m = ((32'(1) << n) - 1) << base;
    return m;
  endfunction

  function automatic logic misaligned(logic [4:0] r, logic [3:0] n);
    return (n > 4'd1) && ((r & 5'(n - 1)) != '0);
  endfunction

  logic [31:0] m_vd, m_vs1, m_vs2;
  logic        bad;

  always_comb begin
    in = vinstr_t'(req.instr);
    h  = sub_none();
    for (int k = NSUB - 1; k >= 0; k--) if (s[k].recognized) h = s[k];

    m_vd  = h.wr_vd || h.rd_vd ? grp_bits(in.vd,  h.grp_vd)  : '0;
    m_vs1 = h.rd_vs1           ? grp_bits(in.vs1, h.grp_vs1) : '0;
    m_vs2 = h.rd_vs2           ? grp_bits(in.vs2, h.grp_vs2) : '0;
    sboard_check = m_vd | m_vs1 | m_vs2 | ((h.uop.mask_en || h.uop.mask_sel) ? 32'h1 : 32'h0);

    bad = h.illegal;
    if ((h.wr_vd || h.rd_vd) && misaligned(in.vd, h.grp_vd))  bad = 1'b1;
    if (h.rd_vs1 && misaligned(in.vs1, h.grp_vs1))            bad = 1'b1;
    if (h.rd_vs2 && misaligned(in.vs2, h.grp_vs2))            bad = 1'b1;
    if (h.no_overlap && h.wr_vd && ((m_vd & (m_vs1 | m_vs2)) != '0)) bad = 1'b1;
    if (h.wr_vd && !h.mask_dest && h.uop.mask_en && !h.uop.mask_sel && m_vd[0]) bad = 1'b1;
    if (h.needs_vtype && csr.vtype.vill) bad = 1'b1;

    resp               = '0;
    resp.recognized    = h.recognized;
    resp.illegal       = h.recognized && bad;
    resp.wait_hazard   = !sboard_clear;
    resp.outer_init    = h.outer_init;
    resp.outer_end     = h.outer_end;
    resp.inner_end     = h.inner_end;
    resp.uop           = h.uop;
    resp.branch        = 1'b0;
    resp.branch_target = '0;
    resp.next_outer    = 1'b0;
  end

endmodule
