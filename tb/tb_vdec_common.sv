// tb_vdec_common: self-checking test of the vector decoder extension.
//
// Presents encoded vector instructions to the decoder the way the expander
// does (prepare, then the busy phase with the outer counter stepping) under
// random vl and element widths, and checks what it answers: recognition of
// vector and non-vector opcodes, the element range, the micro-op's unit,
// function, operand and write-back locations for each element, the
// scoreboard bitmap and the hazard wait, and the illegal cases (misaligned
// register group, masked write to v0, vill, reduction with vstart != 0). The
// expected locations are worked out here from the element index and SEW.
module tb_vdec_common;
  import lem_pkg::*;
  import lem_ext_pkg::*;

  int checks = 0, failures = 0;

  ext_req_t        req;
  vcsr_t           csr;
  logic [XLEN-1:0] in_rs1, cur_rs1;
  logic            sboard_clear;
  logic [31:0]     sboard_check;
  ext_resp_t       resp;

  vdec_common dut (.req, .csr, .in_rs1, .cur_rs1, .sboard_clear, .sboard_check, .resp);

  task automatic chk(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h expected %h", what, got, exp); end
  endtask

  function automatic logic [31:0] opv(logic [5:0] f6, logic vm, logic [4:0] vs2, logic [4:0] vs1,
                                      logic [2:0] f3, logic [4:0] vd);
    return {f6, vm, vs2, vs1, f3, vd, 7'b1010111};
  endfunction

  task automatic setcsr(int sew, int lmul, int vl);
    csr = '0;
    csr.vtype.vsew = 3'(sew); csr.vtype.vlmul = 3'(lmul); csr.vl = VL_W'(vl);
  endtask

  task automatic prep(logic [31:0] ins);
    req = '0; req.instr = ins; req.prepare = 1'b1;
    #1;
  endtask

  task automatic at(int o);
    req.prepare = 1'b0; req.busy = 1'b1; req.outer = CNT_W'(o); req.inner = '0;
    #1;
  endtask

  // location of element i of register r at element width 8<<s
  function automatic logic [6:0] loc(int r, int i, int s);
    int bytepos = i << s;
    return {5'(r + bytepos / 32), 2'((bytepos % 32) / 8)};
  endfunction

  initial begin
    in_rs1 = 64'd7; cur_rs1 = 64'd7; sboard_clear = 1'b1; req = '0;

    for (int t = 0; t < 200; t++) begin
      automatic int s = $urandom_range(0, 3);
      automatic int vl = $urandom_range(1, 256 >> (s + 3));
      setcsr(s, 0, vl);
      // vadd.vv v3, v1, v2
      prep(opv(6'b000000, 1'b1, 5'd1, 5'd2, 3'b000, 5'd3));
      chk("vadd recognized", 64'(resp.recognized), 1);
      chk("vadd legal", 64'(resp.illegal), 0);
      chk("vadd range", 64'(resp.outer_end - resp.outer_init), 64'(vl));
      chk("vadd sboard", 64'(sboard_check), 64'h0000_000E);
      for (int i = 0; i < vl; i++) begin
        at(i);
        chk("vadd fu", 64'(resp.uop.fu), 64'(FU_ALU));
        chk("vadd fn", 64'(resp.uop.alu.fn), 64'(ALU_ADD));
        chk("vadd elem", 64'(resp.uop.elem), 64'(i));
        chk("vadd src vs2", 64'({resp.uop.src2.req.vreg, resp.uop.src2.req.dw}), 64'(loc(1, i, s)));
        chk("vadd src vs1", 64'({resp.uop.src1.req.vreg, resp.uop.src1.req.dw}), 64'(loc(2, i, s)));
        chk("vadd wb mode", 64'(resp.uop.wb.mode), 64'(WB_ELEM));
        chk("vadd wb loc", 64'({resp.uop.wb.req.vreg, resp.uop.wb.req.dw}), 64'(loc(3, i, s)));
        chk("vadd wb boff", 64'(resp.uop.wb.manip.boff), 64'((i << s) % 8));
      end
      // vsub.vx v4, v5, x: operands exchanged (vs2 - rs1)
      prep(opv(6'b000010, 1'b1, 5'd5, 5'd0, 3'b100, 5'd4));
      at(0);
      chk("vsub.vx xchg", 64'(resp.uop.alu.xchg), 1);
      chk("vsub.vx scalar", 64'(resp.uop.src1.sel), 64'(SRC_XREG));
      // vmslt.vv v6, v2, v1: one mask bit per element
      prep(opv(6'b011011, 1'b1, 5'd2, 5'd1, 3'b000, 5'd6));
      for (int i = 0; i < vl; i++) begin
        at(i);
        chk("vmslt wb", 64'(resp.uop.wb.mode), 64'(WB_MBIT));
        chk("vmslt bit", 64'({resp.uop.wb.req.dw, resp.uop.wb.mbit}), 64'(i));
      end
      // masked vadd.vi v7, v1, 3, v0.t: v0 in the bitmap, mask enable
      prep(opv(6'b000000, 1'b0, 5'd1, 5'd3, 3'b011, 5'd7));
      chk("masked sboard", 64'(sboard_check), 64'h0000_0083);
      at(0);
      chk("masked mask_en", 64'(resp.uop.mask_en), 1);
      chk("vadd.vi imm", 64'(resp.uop.src1.sel), 64'(SRC_IMM));
      // masked write to v0 is illegal
      prep(opv(6'b000000, 1'b0, 5'd1, 5'd3, 3'b011, 5'd0));
      chk("masked vd=v0 illegal", 64'(resp.illegal), 1);
      // vle<sew> v8, (rs1)
      prep({3'b000, 1'b0, 2'b00, 1'b1, 5'd0, 5'd1, (s == 0) ? 3'b000 : 3'b100 + 3'(s), 5'd8, 7'b0000111});
      chk("vle recognized", 64'(resp.recognized), 1);
      chk("vle legal", 64'(resp.illegal), 0);
      chk("vle range", 64'(resp.outer_end), 64'(vl));
      at(vl - 1);
      chk("vle fu", 64'(resp.uop.fu), 64'(FU_MEM));
    end

    setcsr(3, 0, 4);
    // not a vector instruction
    prep(32'h00B50533);
    chk("scalar not recognized", 64'(resp.recognized), 0);
    // hazard wait follows the scoreboard
    prep(opv(6'b000000, 1'b1, 5'd1, 5'd2, 3'b000, 5'd3));
    sboard_clear = 1'b0; #1;
    chk("hazard wait", 64'(resp.wait_hazard), 1);
    sboard_clear = 1'b1; #1;
    chk("no hazard wait", 64'(resp.wait_hazard), 0);
    // LMUL = 2: odd register group is illegal, even is legal
    setcsr(3, 1, 8);
    prep(opv(6'b000000, 1'b1, 5'd2, 5'd4, 3'b000, 5'd3));
    chk("misaligned group illegal", 64'(resp.illegal), 1);
    prep(opv(6'b000000, 1'b1, 5'd2, 5'd4, 3'b000, 5'd6));
    chk("aligned group legal", 64'(resp.illegal), 0);
    chk("aligned group sboard", 64'(sboard_check), 64'h0000_00FC);
    // vill: vector op illegal, vsetvli still legal
    setcsr(3, 0, 4); csr.vtype.vill = 1'b1;
    prep(opv(6'b000000, 1'b1, 5'd1, 5'd2, 3'b000, 5'd3));
    chk("vill makes vadd illegal", 64'(resp.illegal), 1);
    prep({1'b0, 11'h018, 5'd10, 3'b111, 5'd5, 7'b1010111});
    chk("vsetvli recognized", 64'(resp.recognized), 1);
    chk("vsetvli legal under vill", 64'(resp.illegal), 0);
    // reduction with vstart != 0 is illegal
    setcsr(3, 0, 4); csr.vstart = 1;
    prep(opv(6'b000000, 1'b1, 5'd1, 5'd9, 3'b010, 5'd8));
    chk("vredsum vstart illegal", 64'(resp.illegal), 1);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
