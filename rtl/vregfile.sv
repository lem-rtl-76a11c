// vregfile: flip-flop vector register file with its request logic.
//
// 32 registers of VLEN bits, stored as 64-bit double words. A micro-op in the
// register-read stage presents three operand requests; each names a register
// and a double word (VectorRegReq) plus how to take an element out of it
// (OperandManip: byte offset, element width, sign or zero extension to 64
// bits). A request may instead select a scalar register value, the 5-bit
// immediate (sign-extended to SEW unless imm_unsigned), a constant (0, 1, the
// element index) or an index register.
//
// Mask: v0 is kept a second time (v0_q) so the mask bit of element `elem` is
// read without a fourth read port. With mask_src2 the bit comes from the
// operand-2 register instead of v0. With mask_en the bit gates the micro-op
// (kill), with mask_sel it is a data input (control bit). For 64-bit mask
// operations (mdw_tail) a bit select is built from v0 and vl.
//
// Index unit (permutations): N_IDX short index registers, an index adder whose
// inputs are an index register, the mask bit of element `elem` of operand 2's
// register, or decoder values, and a comparator (sum < limit) whose output can
// replace the control bit. A source with by_index reads the element whose
// number is the adder sum. Index registers load from operand 1 or the adder
// when the micro-op is accepted (rr_fire).
//
// Write port 1 (pipeline write-back) writes an element, a single mask bit or a
// whole mask double word merged under a bit select. Single-bit writes use a
// 64-bit buffer that holds the rest of the destination double word: it is
// refilled from the array at the first micro-op of an instruction or when the
// double word changes, and updated after each write. Write port 2 (long
// latency units) takes an RD tag that is decoded into the element location.
// Writes take effect at the clock edge; reads are combinational.
//
// The organisation (3 read, 2 write ports, v0 copy, mask buffer, RD tags,
// immediate generation, index registers/adder/comparator) follows the
// document; field encodings, the index unit's exact inputs and the port-2
// priority on a same-word collision are this design's choices.
module vregfile
  import lem_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic [VL_W-1:0]  vl,
  // register-read stage
  input  uop_t             rr_uop,
  input  logic             rr_fire,
  input  logic [XLEN-1:0]  rs1_val,
  input  logic [XLEN-1:0]  rs2_val,
  input  logic [XLEN-1:0]  frs1_val,
  output logic [XLEN-1:0]  op1,
  output logic [XLEN-1:0]  op2,
  output logic [XLEN-1:0]  op3,
  output logic             ctrl_bit,
  output logic             kill,
  output logic [XLEN-1:0]  mdw_sel,
  // write port 1
  input  logic             w1_valid,
  input  wb_t              w1,
  input  logic             w1_first,
  input  logic [XLEN-1:0]  w1_data,
  input  logic             w1_mbit,
  input  logic [XLEN-1:0]  w1_sel,
  // write port 2 (RD tag)
  input  logic             w2_valid,
  input  rdtag_t           w2_tag,
  input  logic [XLEN-1:0]  w2_data,
  // whole-register view for debugging and testbenches
  output logic [VLEN-1:0]  dbg_vreg [NVREG]
);

  logic [XLEN-1:0] rf_q [NVREG][DW_PER_REG];
  logic [VLEN-1:0] v0_q;
  logic [IDX_W-1:0] idx_q [N_IDX];
  logic [XLEN-1:0] mbuf_q;
  logic            mbuf_v_q;
  logic [4:0]      mbuf_reg_q;
  logic [DW_W-1:0] mbuf_dw_q;

  // ------------------------------------------------------------ helpers
  function automatic logic [XLEN-1:0] extend(logic [XLEN-1:0] v, sew_e eew, logic sext);
    unique case (eew)
      SEW8:    return sext ? XLEN'($signed(v[7:0]))  : XLEN'(v[7:0]);
      SEW16:   return sext ? XLEN'($signed(v[15:0])) : XLEN'(v[15:0]);
      SEW32:   return sext ? XLEN'($signed(v[31:0])) : XLEN'(v[31:0]);
      default: return v;
    endcase
  endfunction

  function automatic logic [XLEN-1:0] put_elem(logic [XLEN-1:0] old, logic [XLEN-1:0] d,
                                              logic [2:0] boff, sew_e eew);
    logic [XLEN-1:0] m;
    m = ((eew == SEW64) ? '1 : ((XLEN'(1) << (8 << eew)) - 1'b1)) << {boff, 3'b000};
    return (old & ~m) | ((d << {boff, 3'b000}) & m);
  endfunction

  // ------------------------------------------------------------ index unit
  logic             v0bit, mbit_src, srcbit, mbit;
  logic [IDX_W-1:0] ia, ib, isum;
  logic             icmp;

  always_comb begin
    v0bit    = v0_q[rr_uop.elem[$clog2(VLEN)-1:0]];
    srcbit   = dbg_vreg[rr_uop.src2.req.vreg][rr_uop.elem[$clog2(VLEN)-1:0]];
    mbit_src = srcbit && (!rr_uop.mask_en || v0bit);
    // the micro-op's mask bit: v0 by default, or the operand-2 register
    mbit     = rr_uop.mask_src2 ? srcbit : v0bit;
    unique case (rr_uop.idx.a_sel)
      IA_IDXREG:  ia = idx_q[rr_uop.idx.a_reg];
      IA_MASKBIT: ia = IDX_W'(mbit_src);
      default:    ia = rr_uop.idx.a_val;
    endcase
    unique case (rr_uop.idx.b_sel)
      IA_IDXREG:  ib = idx_q[rr_uop.idx.b_reg];
      IA_MASKBIT: ib = IDX_W'(mbit_src);
      default:    ib = rr_uop.idx.b_val;
    endcase
    isum = ia + ib;
    icmp = isum < rr_uop.idx.cmp_lim;
  end

  // ------------------------------------------------------------ operand read
  function automatic logic [XLEN-1:0] read_src(src_t s);
    vreg_req_t       loc;
    opmanip_t        mp;
    logic [XLEN-1:0] raw;
    mp = s.manip;
    unique case (s.sel)
      SRC_VREG: begin
        if (s.by_index) begin
          loc     = elem_loc(s.req.vreg, CNT_W'(isum), s.manip.eew);
          mp.boff = elem_manip(CNT_W'(isum), s.manip.eew, s.manip.sext).boff;
        end else begin
          loc = s.req;
        end
        raw = rf_q[loc.vreg][loc.dw] >> {mp.boff, 3'b000};
        return extend(raw, mp.eew, mp.sext);
      end
      SRC_XREG: return extend(rs1_val, mp.eew, mp.sext);
      SRC_XREG2: return extend(rs2_val, mp.eew, mp.sext);
      SRC_FREG: return frs1_val;
      SRC_IMM: begin
        raw = rr_uop.imm_unsigned ? XLEN'(rr_uop.imm) : XLEN'($signed(rr_uop.imm));
        return extend(raw, mp.eew, mp.sext);
      end
      SRC_ZERO: return '0;
      SRC_ONE:  return XLEN'(1);
      SRC_ELEM: return XLEN'(rr_uop.elem);
      default:  return XLEN'(ia);   // SRC_IDX: the adder's A input
    endcase
  endfunction

  always_comb begin
    op1 = read_src(rr_uop.src1);
    op2 = read_src(rr_uop.src2);
    op3 = read_src(rr_uop.src3);
    ctrl_bit = rr_uop.idx.cmp_en ? icmp : (rr_uop.mask_sel ? mbit : 1'b1);
    kill     = rr_uop.skip || rr_uop.mask_en && !rr_uop.mask_sel && !rr_uop.mdw_tail && !mbit;
    for (int b = 0; b < XLEN; b++) begin
      logic [CNT_W-1:0] e;
      e = rr_uop.elem + CNT_W'(b);
      mdw_sel[b] = (e < CNT_W'(vl)) &&
                   (!rr_uop.mask_en || v0_q[e[$clog2(VLEN)-1:0]]);
    end
  end

  // ------------------------------------------------------------ write ports
  logic [XLEN-1:0] w1_old, w1_new, mbase;
  logic            mbuf_hit;

  always_comb begin
    w1_old   = rf_q[w1.req.vreg][w1.req.dw];
    mbuf_hit = mbuf_v_q && !w1_first && mbuf_reg_q == w1.req.vreg && mbuf_dw_q == w1.req.dw;
    mbase    = mbuf_hit ? mbuf_q : w1_old;
    unique case (w1.mode)
      WB_ELEM: w1_new = put_elem(w1_old, w1_data, w1.manip.boff, w1.manip.eew);
      WB_MBIT: begin
        w1_new = mbase;
        w1_new[w1.mbit] = w1_mbit;
      end
      WB_MDW:  w1_new = (w1_data & w1_sel) | (w1_old & ~w1_sel);
      default: w1_new = w1_old;
    endcase
  end

  logic w1_en, w2_en;
  assign w1_en = w1_valid && w1.mode != WB_NONE;
  assign w2_en = w2_valid && w2_tag.vwe;

  // port 2 is applied on top of port 1 when both hit one double word
  logic [XLEN-1:0] base2, new2;
  always_comb begin
    base2 = (w1_en && w1.req.vreg == w2_tag.vreg && w1.req.dw == w2_tag.dw)
            ? w1_new : rf_q[w2_tag.vreg][w2_tag.dw];
    new2  = put_elem(base2, w2_data, w2_tag.boff, w2_tag.eew);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < NVREG; r++)
        for (int d = 0; d < DW_PER_REG; d++) rf_q[r][d] <= '0;
      v0_q       <= '0;
      for (int i = 0; i < N_IDX; i++) idx_q[i] <= '0;
      mbuf_q     <= '0;
      mbuf_v_q   <= 1'b0;
      mbuf_reg_q <= '0;
      mbuf_dw_q  <= '0;
    end else begin
      if (w1_en) begin
        rf_q[w1.req.vreg][w1.req.dw] <= w1_new;
        if (w1.req.vreg == 5'd0) v0_q[w1.req.dw*64 +: 64] <= w1_new;
        if (w1.mode == WB_MBIT) begin
          mbuf_q     <= w1_new;
          mbuf_v_q   <= 1'b1;
          mbuf_reg_q <= w1.req.vreg;
          mbuf_dw_q  <= w1.req.dw;
        end else if (w1.req.vreg == mbuf_reg_q && w1.req.dw == mbuf_dw_q) begin
          mbuf_v_q <= 1'b0;
        end
      end
      if (w2_en) begin
        rf_q[w2_tag.vreg][w2_tag.dw] <= new2;
        if (w2_tag.vreg == 5'd0) v0_q[w2_tag.dw*64 +: 64] <= new2;
        if (w2_tag.vreg == mbuf_reg_q && w2_tag.dw == mbuf_dw_q) mbuf_v_q <= 1'b0;
      end
      if (rr_fire && rr_uop.idx.we) begin
        if (rr_uop.idx.wr_read)
          idx_q[rr_uop.idx.wr_reg] <= (op1 > XLEN'({IDX_W{1'b1}})) ? '1 : IDX_W'(op1);
        else
          idx_q[rr_uop.idx.wr_reg] <= isum;
      end
    end
  end

  always_comb
    for (int r = 0; r < NVREG; r++)
      for (int d = 0; d < DW_PER_REG; d++) dbg_vreg[r][d*64 +: 64] = rf_q[r][d];

endmodule
