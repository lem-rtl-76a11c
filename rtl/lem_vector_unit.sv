// lem_vector_unit: RISC-V vector unit built on the LEM microcode expander.
//
// The unit sits between the instruction front end and one scalar-style
// execution pipe. Vector instructions are expanded by lem_expander, whose
// single decoder extension is the vector decoder (vdec_common with its five
// decode modules); every other instruction is handed back unchanged on
// pass_*. Each micro-op then flows through three stages:
//   RR  register read: the micro-op leaves the expander; vregfile reads up to
//       three operands, the v0 mask bit and the index unit; vsetvl micro-ops
//       update the vector CSRs here; the scoreboard counts the write.
//   EX  the extended ALU (element ops, reductions, mask ops, address
//       generation), the pipelined multiply-add unit, the memory request port
//       or the FP request port. A memory or FP request that is not accepted,
//       or an FP reduction waiting for the reduction queue, stalls EX and RR.
//   WB  ALU results are written through register-file write port 1 and/or to
//       the scalar destination (xwb_*).
// Long-latency results (multiplier, memory loads, FPU) carry an RD tag and are
// written through write port 2; arbitration gives the multiplier priority,
// then the FPU, then memory. FP results tagged "reduce" go to the FP reduction
// queue instead. The scoreboard is released at each write. A load response
// with an error truncates vl (fault-only-first, element > 0) or traps and sets
// vstart; both stop the expander.
//
// The memory system (a HellaCache-style request/response port with tags), the
// FPU, the instruction cache and the scalar pipelines are outside this unit;
// their signals are ports. The block structure follows the datapath figure
// and the text; the three-stage timing, the port-2 arbitration and the
// handshakes are this design's choices.
//
// Reset is asynchronous and active low. Lint reports rst_n as used both
// synchronously and asynchronously: the synchronous use is only the
// "disable iff (!rst_n)" of the handshake assertions in the sub-blocks, not
// logic.
module lem_vector_unit
  import lem_pkg::*;
  import lem_ext_pkg::*;
#(
  parameter int unsigned MUL_LATENCY = 3,
  parameter int unsigned REDQ_DEPTH  = 2,
  parameter int unsigned SB_CNT_W    = 6
) (
  input  logic              clk,
  input  logic              rst_n,
  // front end
  input  logic              in_valid,
  input  logic [31:0]       in_instr,
  input  logic [XLEN-1:0]   in_rs1,
  input  logic [XLEN-1:0]   in_rs2,
  input  logic [XLEN-1:0]   in_frs1,
  output logic              in_ready,
  output logic              pass_valid,
  output logic [31:0]       pass_instr,
  output logic              illegal,
  output logic              busy,
  // scalar write-back
  output logic              xwb_valid,
  output logic [4:0]        xwb_rd,
  output logic [XLEN-1:0]   xwb_data,
  // memory port
  output logic              mem_req_valid,
  input  logic              mem_req_ready,
  output logic [XLEN-1:0]   mem_req_addr,
  output logic              mem_req_store,
  output sew_e              mem_req_size,
  output logic [XLEN-1:0]   mem_req_data,
  output rdtag_t            mem_req_tag,
  input  logic              mem_resp_valid,
  output logic              mem_resp_ready,
  input  rdtag_t            mem_resp_tag,
  input  logic [XLEN-1:0]   mem_resp_data,
  input  logic              mem_resp_error,
  // FPU port
  output logic              fp_req_valid,
  input  logic              fp_req_ready,
  output fp_fn_e            fp_req_fn,
  output logic [XLEN-1:0]   fp_req_a,
  output logic [XLEN-1:0]   fp_req_b,
  output logic [XLEN-1:0]   fp_req_c,
  output rdtag_t            fp_req_tag,
  input  logic              fp_resp_valid,
  output logic              fp_resp_ready,
  input  rdtag_t            fp_resp_tag,
  input  logic [XLEN-1:0]   fp_resp_data,
  // control and status
  input  logic              flush,
  input  logic              replay,
  input  logic              vstart_we,
  input  logic [VL_W-1:0]   vstart_wdata,
  input  logic              vxrm_we,
  input  logic [1:0]        vxrm_wdata,
  output vcsr_t             csr,
  output logic              vxsat,
  output logic              trap,
  output logic              sb_stall,
  output logic [VLEN-1:0]   dbg_vreg [NVREG]
);

  // ------------------------------------------------------------ expander
  ext_req_t        ext_req;
  ext_resp_t       ext_resp [1];
  uop_t            rr_uop;
  logic            rr_valid, rr_fire, ex_stall, terminate, csr_term;
  logic [31:0]     cur_instr;
  logic [XLEN-1:0] cur_rs1, cur_rs2, cur_frs1;
  logic [31:0]     sb_check;
  logic            sb_clear;

  lem_expander #(.N_EXT(1)) u_exp (
    .clk, .rst_n,
    .in_valid, .in_instr, .in_rs1, .in_rs2, .in_frs1, .in_ready,
    .pass_valid, .pass_instr, .illegal,
    .ext_req, .ext_resp,
    .uop_valid(rr_valid), .uop(rr_uop), .uop_ready(!ex_stall),
    .cur_instr, .cur_rs1, .cur_rs2, .cur_frs1,
    .terminate, .flush, .busy
  );

  vdec_common u_vdec (
    .req(ext_req), .csr, .in_rs1, .cur_rs1,
    .sboard_clear(sb_clear), .sboard_check(sb_check), .resp(ext_resp[0])
  );

  assign sb_stall = !busy && in_valid && ext_resp[0].recognized && !sb_clear;
  assign rr_fire  = rr_valid && rr_uop.valid && !ex_stall;

  // ------------------------------------------------------------ CSRs
  logic [XLEN-1:0] vset_vl;
  logic            fault_valid, alu_vxsat, mul_sat;
  rdtag_t          p2_tag;

  vcsr u_csr (
    .clk, .rst_n,
    .vset_valid(rr_fire && rr_uop.fu == FU_CSR), .vset(rr_uop.vset),
    .rs1_val(cur_rs1), .rs2_val(cur_rs2), .vset_new_vl(vset_vl),
    .fault_valid, .fault_ff(mem_resp_tag.ff), .fault_elem(mem_resp_tag.elem),
    .terminate(csr_term), .trap,
    .instr_done(rr_fire && rr_uop.last), .vxsat_set(alu_vxsat || mul_sat),
    .vstart_we, .vstart_wdata, .vxrm_we, .vxrm_wdata,
    .csr, .vxsat
  );
  assign terminate = csr_term || trap;

  // ------------------------------------------------------------ register file
  logic [XLEN-1:0] rd1, rd2, rd3, rd_sel;
  logic            rd_cbit, rd_kill;
  logic            w1_valid, w2_valid;
  wb_t             w1;
  logic            w1_first, w1_mbit;
  logic [XLEN-1:0] w1_data, w1_sel, w2_data;

  vregfile u_vrf (
    .clk, .rst_n, .vl(csr.vl),
    .rr_uop, .rr_fire, .rs1_val(cur_rs1), .rs2_val(cur_rs2), .frs1_val(cur_frs1),
    .op1(rd1), .op2(rd2), .op3(rd3), .ctrl_bit(rd_cbit), .kill(rd_kill), .mdw_sel(rd_sel),
    .w1_valid, .w1, .w1_first, .w1_data, .w1_mbit, .w1_sel,
    .w2_valid, .w2_tag(p2_tag), .w2_data,
    .dbg_vreg
  );

  // ------------------------------------------------------------ EX stage
  uop_t            ex_uop;
  logic            ex_valid, ex_kill, ex_cbit, ex_go;
  logic [XLEN-1:0] ex_op1, ex_op2, ex_op3, ex_sel, ex_csr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ex_valid <= 1'b0;
      ex_uop   <= '0;
      ex_kill  <= 1'b0;
      ex_cbit  <= 1'b0;
      ex_op1   <= '0;
      ex_op2   <= '0;
      ex_op3   <= '0;
      ex_sel   <= '0;
      ex_csr   <= '0;
    end else if (flush) begin
      ex_valid <= 1'b0;
    end else if (!ex_stall) begin
      ex_valid <= rr_fire;
      ex_uop   <= rr_uop;
      ex_kill  <= rd_kill;
      ex_cbit  <= rd_cbit;
      ex_op1   <= rd1;
      ex_op2   <= rd2;
      ex_op3   <= rd3;
      ex_sel   <= rd_sel;
      ex_csr   <= vset_vl;
    end
  end

  // FP reduction queue
  logic            rq_empty, rq_full, rq_pop, rq_push;
  logic [XLEN-1:0] rq_head;

  logic ex_is_mem, ex_is_fp, ex_is_mul, ex_is_alu, ex_fp_wait;
  assign ex_is_mem  = ex_valid && ex_uop.fu == FU_MEM;
  assign ex_is_fp   = ex_valid && ex_uop.fu == FU_FP  && !ex_kill;
  assign ex_is_mul  = ex_valid && ex_uop.fu == FU_MUL && !ex_kill;
  assign ex_is_alu  = ex_valid && ex_uop.fu == FU_ALU && !ex_kill;
  assign ex_fp_wait = ex_uop.src1.reduce && rq_empty;
  assign ex_stall   = (ex_is_mem && !ex_kill && !mem_req_ready) ||
                      (ex_is_fp && (!fp_req_ready || ex_fp_wait));
  assign ex_go      = ex_valid && !ex_stall;

  // extended ALU
  logic [XLEN-1:0] alu_out;
  logic            alu_mout;
  ext_alu u_alu (
    .clk, .rst_n,
    .valid(ex_go && (ex_is_alu || ex_is_mem)),
    .ctrl(ex_uop.alu), .sew(ex_uop.src2.manip.eew), .vxrm(csr.vxrm),
    .in1(ex_op1), .in2(ex_op2), .in3(ex_uop.mdw_tail ? ex_sel : ex_op3),
    .ctrl_bit(ex_cbit), .replay,
    .out(alu_out), .mask_out(alu_mout), .vxsat(alu_vxsat)
  );

  // memory request
  assign mem_req_valid = ex_is_mem && !ex_kill;
  assign mem_req_addr  = alu_out;
  assign mem_req_store = ex_uop.mem.store;
  assign mem_req_size  = ex_uop.mem.store ? ex_uop.src3.manip.eew : ex_uop.wb.manip.eew;
  assign mem_req_data  = ex_op3;
  assign mem_req_tag   = make_tag(ex_uop.wb, ex_uop.elem, ex_uop.mem.ff);

  // FP request; masked-off reduction elements add -0.0
  assign fp_req_valid = ex_is_fp && !ex_fp_wait;
  assign fp_req_fn    = ex_uop.fp;
  assign fp_req_a     = ex_uop.src1.reduce ? rq_head : ex_op1;
  assign fp_req_b     = (ex_uop.mask_sel && !ex_cbit) ? {1'b1, {(XLEN-1){1'b0}}} : ex_op2;
  assign fp_req_c     = ex_op3;
  assign fp_req_tag   = make_tag(ex_uop.wb, ex_uop.elem, 1'b0);
  assign rq_pop       = ex_is_fp && ex_go && ex_uop.src1.reduce;

  // multiplier
  logic            mul_ov;
  logic [XLEN-1:0] mul_out;
  rdtag_t          mul_tag;
  vmul_add #(.LATENCY(MUL_LATENCY)) u_mul (
    .clk, .rst_n,
    .in_valid(ex_is_mul && ex_go), .fn(ex_uop.mul), .sew(ex_uop.src2.manip.eew), .vxrm(csr.vxrm),
    .in1(ex_op1), .in2(ex_op2), .in3(ex_op3),
    .in_tag(make_tag(ex_uop.wb, ex_uop.elem, 1'b0)),
    .out_valid(mul_ov), .out(mul_out), .out_tag(mul_tag), .out_sat(mul_sat)
  );

  // ------------------------------------------------------------ WB stage
  logic            wb_valid, wb_mb, wb_first;
  uop_t            wb_uop;
  logic [XLEN-1:0] wb_data, wb_sel;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wb_valid <= 1'b0;
      wb_uop   <= '0;
      wb_data  <= '0;
      wb_mb  <= 1'b0;
      wb_sel   <= '0;
      wb_first <= 1'b0;
    end else begin
      wb_valid <= ex_go && !flush && ((ex_is_alu) || (ex_valid && ex_uop.fu == FU_CSR));
      wb_uop   <= ex_uop;
      wb_data  <= (ex_uop.fu == FU_CSR) ? ex_csr : alu_out;
      wb_mb  <= alu_mout;
      wb_sel   <= ex_sel;
      wb_first <= ex_uop.first;
    end
  end

  assign w1_valid  = wb_valid && wb_uop.fu == FU_ALU;
  assign w1        = wb_uop.wb;
  assign w1_first  = wb_first;
  assign w1_data   = wb_data;
  assign w1_mbit   = wb_mb;
  assign w1_sel    = wb_sel;
  assign xwb_valid = wb_valid && wb_uop.wb.xreg;
  assign xwb_rd    = wb_uop.xrd;
  assign xwb_data  = wb_data;

  // ------------------------------------------------------------ write port 2
  logic mem_take, fp_take, fp_to_q, mem_drop;
  assign fp_to_q        = fp_resp_valid && fp_resp_tag.reduce;
  assign fp_resp_ready  = fp_to_q ? !rq_full : !mul_ov;
  assign mem_resp_ready = !mul_ov && !(fp_resp_valid && !fp_resp_tag.reduce);
  assign fp_take        = fp_resp_valid && !fp_to_q && !mul_ov;
  assign mem_take       = mem_resp_valid && mem_resp_ready;
  assign fault_valid    = mem_take && mem_resp_error;
  // elements past a fault-only-first truncation are dropped
  assign mem_drop       = mem_resp_error ||
                          (mem_resp_tag.ff && CNT_W'(csr.vl) <= mem_resp_tag.elem);

  always_comb begin
    w2_valid = 1'b0;
    p2_tag   = mem_resp_tag;
    w2_data  = mem_resp_data;
    if (mul_ov) begin
      w2_valid = 1'b1;
      p2_tag   = mul_tag;
      w2_data  = mul_out;
    end else if (fp_take) begin
      w2_valid = 1'b1;
      p2_tag   = fp_resp_tag;
      w2_data  = fp_resp_data;
    end else if (mem_take) begin
      w2_valid = !mem_drop;
      p2_tag   = mem_resp_tag;
      w2_data  = mem_resp_data;
    end
  end

  assign rq_push = fp_to_q && fp_resp_ready;
  fp_reduce_queue #(.DEPTH(REDQ_DEPTH)) u_rq (
    .clk, .rst_n, .flush,
    .push(rq_push), .push_data(fp_resp_data), .pop(rq_pop),
    .empty(rq_empty), .full(rq_full), .head(rq_head)
  );

  // ------------------------------------------------------------ scoreboard
  logic       sb_inc;
  logic [2:0] sb_dec;
  logic [4:0] sb_dec_reg [3];
  logic       p2_release;

  assign sb_inc     = rr_fire && !rd_kill && rr_uop.wb.mode != WB_NONE;
  assign p2_release = mul_ov ? mul_tag.vwe : (fp_take ? fp_resp_tag.vwe : (mem_take && mem_resp_tag.vwe));
  assign sb_dec[0]  = w1_valid && w1.mode != WB_NONE;
  assign sb_dec_reg[0] = w1.req.vreg;
  assign sb_dec[1]  = p2_release;
  assign sb_dec_reg[1] = p2_tag.vreg;
  // a flushed micro-op in EX releases its count at once
  assign sb_dec[2]  = flush && ex_valid && !ex_kill && ex_uop.wb.mode != WB_NONE;
  assign sb_dec_reg[2] = ex_uop.wb.req.vreg;

  logic [31:0] sb_pending;
  vsboard #(.NREG(32), .CNT_W(SB_CNT_W), .N_DEC(3)) u_sb (
    .clk, .rst_n,
    .inc_valid(sb_inc), .inc_reg(rr_uop.wb.req.vreg),
    .dec_valid(sb_dec), .dec_reg(sb_dec_reg),
    .check(sb_check), .clear(sb_clear), .pending(sb_pending)
  );

endmodule
