// vcsr: vector control and status registers (vtype, vl, vstart, vxrm, vxsat).
//
// Holds the vector CSRs and feeds them to the decoders. It
//  * executes vsetvl/vsetvli/vsetivli micro-ops: picks the requested AVL
//    (rs1, 5-bit immediate, VLMAX, or keep vl), checks the new vtype, and sets
//    vl = min(AVL, VLMAX); the new vl is returned for the scalar destination;
//  * for fault-only-first loads, on a fault at element k > 0 lowers vl to k
//    and asks the expander to stop issuing (terminate), with no trap;
//  * on a trap at element k (a faulting element of any other load/store, or
//    element 0 of a fault-only-first load) sets vstart = k and raises trap;
//  * clears vstart when an instruction completes, and accumulates vxsat;
//  * allows the scalar side to write vstart and vxrm.
// All updates take effect at the clock edge; values are read combinationally.
// The duties come from the document; the reset state (vill set, vl = 0) and
// the port shapes are this design's choices.
module vcsr
  import lem_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  // vsetvl micro-op at issue
  input  logic             vset_valid,
  input  vset_ctrl_t       vset,
  input  logic [XLEN-1:0]  rs1_val,
  input  logic [XLEN-1:0]  rs2_val,
  output logic [XLEN-1:0]  vset_new_vl,
  // memory faults
  input  logic             fault_valid,
  input  logic             fault_ff,
  input  logic [CNT_W-1:0] fault_elem,
  output logic             terminate,
  output logic             trap,
  // bookkeeping
  input  logic             instr_done,
  input  logic             vxsat_set,
  input  logic             vstart_we,
  input  logic [VL_W-1:0]  vstart_wdata,
  input  logic             vxrm_we,
  input  logic [1:0]       vxrm_wdata,
  output vcsr_t            csr,
  output logic             vxsat
);

  vtype_t          vtype_q;
  logic [VL_W-1:0] vl_q, vstart_q;
  logic [1:0]      vxrm_q;
  logic            vxsat_q;

  vtype_t          nvt;
  logic            bad;
  logic [VL_W-1:0] nvlmax;
  logic [XLEN-1:0] avl;

  always_comb begin
    nvt = vset.vtype_from_rs2 ? vtype_t'(rs2_val[7:0]) : vset.vtype;
    bad = (!vset.vtype_from_rs2 && vset.vtype.vill) || (nvt.vsew > 3'd3) || (nvt.vlmul == 3'b100) ||
          (vset.vtype_from_rs2 && (rs2_val[XLEN-1:8] != '0));
    nvt.vill = bad;
    nvlmax   = bad ? '0 : vlmax_of(nvt);
    unique case (vset.avl)
      AVL_RS1:  avl = rs1_val;
      AVL_UIMM: avl = XLEN'(vset.uimm);
      AVL_MAX:  avl = '1;
      default:  avl = XLEN'(vl_q);
    endcase
    vset_new_vl = (avl < XLEN'(nvlmax)) ? avl : XLEN'(nvlmax);
    if (bad) vset_new_vl = '0;
  end

  assign terminate = fault_valid && fault_ff && (fault_elem != '0);
  assign trap      = fault_valid && !(fault_ff && (fault_elem != '0));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vtype_q  <= '{vill: 1'b1, default: '0};
      vl_q     <= '0;
      vstart_q <= '0;
      vxrm_q   <= '0;
      vxsat_q  <= 1'b0;
    end else begin
      if (vset_valid) begin
        vtype_q <= nvt;
        vl_q    <= VL_W'(vset_new_vl);
      end
      if (terminate && VL_W'(fault_elem) < vl_q) vl_q <= VL_W'(fault_elem);
      if (trap)              vstart_q <= VL_W'(fault_elem);
      else if (vstart_we)    vstart_q <= vstart_wdata;
      else if (instr_done)   vstart_q <= '0;
      if (vxrm_we)   vxrm_q  <= vxrm_wdata;
      if (vxsat_set) vxsat_q <= 1'b1;
    end
  end

  assign csr.vtype  = vtype_q;
  assign csr.vl     = vl_q;
  assign csr.vstart = vstart_q;
  assign csr.vxrm   = vxrm_q;
  assign vxsat      = vxsat_q;

endmodule
