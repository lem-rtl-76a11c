// tb_vregfile: self-checking test of the vector register file.
//
// A reference copy of the 32 registers is kept here as bytes. The test
// writes random elements of random width through write port 1 and, in the
// same cycles, through write port 2 (RD tag), sometimes both into one double
// word, and reads elements back through the three operand requests with sign
// or zero extension. It then builds a mask register one bit per cycle through
// the mask-bit buffer, copies it to v0 and checks the mask kill, the control
// bit and the 64-bit bit select against vl. Last it checks the index unit: an
// element read whose number comes from the adder, loading an index register
// from operand 1 (with saturation) and the comparator.
module tb_vregfile;
  import lem_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [VL_W-1:0] vl;
  uop_t            rr_uop;
  logic            rr_fire, ctrl_bit, kill, w1_valid, w1_first, w1_mbit, w2_valid;
  logic [XLEN-1:0] rs1_val, rs2_val, frs1_val, op1, op2, op3, mdw_sel, w1_data, w1_sel, w2_data;
  wb_t             w1;
  rdtag_t          w2_tag;
  logic [VLEN-1:0] dbg_vreg [NVREG];

  vregfile dut (.clk, .rst_n, .vl, .rr_uop, .rr_fire, .rs1_val, .rs2_val, .frs1_val, .op1, .op2, .op3,
                .ctrl_bit, .kill, .mdw_sel, .w1_valid, .w1, .w1_first, .w1_data, .w1_mbit, .w1_sel,
                .w2_valid, .w2_tag, .w2_data, .dbg_vreg);

  logic [7:0] rf [NVREG][VLENB];

  task automatic chk(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h expected %h", what, got, exp); end
  endtask

  function automatic logic [63:0] rd_ref(int r, int i, int s, bit sext);
    logic [63:0] v = '0;
    int w = 1 << s;
    for (int b = 0; b < w; b++) v[b*8 +: 8] = rf[r][(i*w + b) % VLENB];
    if (sext && w < 8 && v[w*8-1]) v = v | ~((64'(1) << (w*8)) - 1);
    return v;
  endfunction

  task automatic wr_ref(int r, int i, int s, logic [63:0] d);
    int w = 1 << s;
    for (int b = 0; b < w; b++) rf[r][(i*w + b) % VLENB] = d[b*8 +: 8];
  endtask

  task automatic idle();
    w1_valid = 0; w2_valid = 0; w1_first = 0; rr_fire = 0;
  endtask

  int n_same;
  initial begin
    vl = 0; rr_uop = '0; rs1_val = 0; rs2_val = 0; frs1_val = 0; w1 = '0; w1_data = 0; w1_sel = 0;
    w1_mbit = 0; w2_tag = '0; w2_data = 0; n_same = 0;
    idle();
    for (int r = 0; r < NVREG; r++) for (int b = 0; b < VLENB; b++) rf[r][b] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;

    // random element writes on both ports, with read-back
    for (int t = 0; t < 3000; t++) begin
      int r1, i1, s1, r2, i2, s2;
      @(negedge clk);
      s1 = $urandom_range(0, 3); r1 = $urandom_range(1, 31); i1 = $urandom_range(0, (VLENB >> s1) - 1);
      s2 = $urandom_range(0, 3); r2 = $urandom_range(1, 31); i2 = $urandom_range(0, (VLENB >> s2) - 1);
      if (t % 5 == 0) begin r2 = r1; s2 = s1; i2 = (i1 ^ 1) % (VLENB >> s1); end
      w1_valid = $urandom_range(0, 1);
      w1 = wb_elem(5'(r1), CNT_W'(i1), sew_e'(s1));
      w1_data = {$urandom, $urandom};
      w2_valid = $urandom_range(0, 1);
      w2_tag = make_tag(wb_elem(5'(r2), CNT_W'(i2), sew_e'(s2)), CNT_W'(i2), 1'b0);
      w2_data = {$urandom, $urandom};
      if (w1_valid && w2_valid && w1.req.vreg == w2_tag.vreg && w1.req.dw == w2_tag.dw) n_same++;
      // reads of three random elements
      begin
        automatic int ra = $urandom_range(0, 31), ia = $urandom_range(0, 31), sa = $urandom_range(0, 3);
        automatic bit xa = $urandom_range(0, 1);
        ia = ia % (VLENB >> sa);
        rr_uop = '0;
        rr_uop.src1 = vsrc(5'(ra), CNT_W'(ia), sew_e'(sa), xa);
        rr_uop.src2 = vsrc(5'(ra ^ 1), CNT_W'(ia), sew_e'(sa), !xa);
        rr_uop.src3 = vsrc(5'(ra ^ 2), CNT_W'(ia), sew_e'(sa), xa);
        #1;
        chk("op1", op1, rd_ref(ra, ia, sa, xa));
        chk("op2", op2, rd_ref(ra ^ 1, ia, sa, !xa));
        chk("op3", op3, rd_ref(ra ^ 2, ia, sa, xa));
      end
      @(posedge clk);
      if (w1_valid) wr_ref(r1, i1, s1, w1_data);
      if (w2_valid) wr_ref(r2, i2, s2, w2_data);
    end
    @(negedge clk) idle();
    for (int r = 0; r < NVREG; r++)
      for (int b = 0; b < VLENB; b += 8) chk($sformatf("v%0d dword %0d", r, b / 8), dbg_vreg[r][b*8 +: 64], rd_ref(r, b / 8, 3, 0));
    chk("both ports hit one double word", 64'(n_same > 0), 1);

    // mask register v5 built bit by bit, then copied to v0
    begin
      logic [VLEN-1:0] m;
      m = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
      for (int i = 0; i < VLEN; i++) begin
        @(negedge clk);
        w1_valid = 1; w1_first = (i == 0); w1 = wb_mbit(5'd5, CNT_W'(i)); w1_mbit = m[i];
        @(posedge clk);
      end
      @(negedge clk) idle();
      chk("mask bits low", dbg_vreg[5][63:0], m[63:0]);
      chk("mask bits high", dbg_vreg[5][255:192], m[255:192]);
      for (int d = 0; d < DW_PER_REG; d++) begin
        @(negedge clk);
        w1_valid = 1; w1 = wb_elem(5'd0, CNT_W'(d), SEW64); w1_data = m[d*64 +: 64];
        @(posedge clk);
      end
      @(negedge clk) idle();
      vl = VL_W'(200);
      for (int i = 0; i < VLEN; i += 7) begin
        rr_uop = '0; rr_uop.elem = CNT_W'(i); rr_uop.mask_en = 1'b1; #1;
        chk("mask kill", 64'(kill), 64'(!m[i]));
        rr_uop.mask_sel = 1'b1; #1;
        chk("mask as control bit", 64'(ctrl_bit), 64'(m[i]));
        chk("no kill with mask_sel", 64'(kill), 0);
        // mask bit from the operand-2 register (v6) instead of v0
        if (i == 0) chk("v6 holds mixed bits", 64'($countones(dbg_vreg[6]) > 20 && $countones(dbg_vreg[6]) < 236), 1);
        rr_uop.mask_src2 = 1'b1; rr_uop.src2.req.vreg = 5'd6; #1;
        chk("control bit from source register", 64'(ctrl_bit), 64'(dbg_vreg[6][i]));
        rr_uop.mask_sel = 1'b0; #1;
        chk("kill by source-register mask", 64'(kill), 64'(!dbg_vreg[6][i]));
      end
      for (int d = 0; d < 4; d++) begin
        logic [63:0] es;
        rr_uop = '0; rr_uop.elem = CNT_W'(d * 64); rr_uop.mask_en = 1'b1; rr_uop.mdw_tail = 1'b1; #1;
        for (int b = 0; b < 64; b++) es[b] = (d * 64 + b < 200) && m[d*64 + b];
        chk("mask dword select", mdw_sel, es);
      end
    end

    // index unit: element whose number is the adder sum (3 + 2 = 5), SEW 16
    rr_uop = '0;
    rr_uop.src1 = vsrc(5'd7, '0, SEW16, 1'b0);
    rr_uop.src1.by_index = 1'b1;
    rr_uop.idx.a_sel = IA_DEC; rr_uop.idx.a_val = 16'd3;
    rr_uop.idx.b_sel = IA_DEC; rr_uop.idx.b_val = 16'd2;
    rr_uop.idx.cmp_en = 1'b1; rr_uop.idx.cmp_lim = 16'd5;
    #1;
    chk("read by index", op1, rd_ref(7, 5, 1, 0));
    chk("comparator 5 < 5", 64'(ctrl_bit), 0);
    rr_uop.idx.cmp_lim = 16'd6; #1;
    chk("comparator 5 < 6", 64'(ctrl_bit), 1);
    // load index register 1 from a scalar value too large: saturates
    @(negedge clk);
    rr_uop = '0; rr_uop.src1 = csrc(SRC_XREG, SEW64, 1'b0); rs1_val = 64'h1_0000_0005;
    rr_uop.idx.we = 1'b1; rr_uop.idx.wr_reg = 1; rr_uop.idx.wr_read = 1'b1; rr_fire = 1'b1;
    @(posedge clk); @(negedge clk) rr_fire = 1'b0;
    rr_uop = '0; rr_uop.src1 = csrc(SRC_IDX, SEW64, 1'b0); rr_uop.idx.a_sel = IA_IDXREG; rr_uop.idx.a_reg = 1;
    #1 chk("index register saturates", op1, 64'hFFFF);
    // index register 0 accumulates through the adder: 0 + 9, then + 9
    for (int k = 0; k < 2; k++) begin
      @(negedge clk);
      rr_uop = '0; rr_uop.idx.a_sel = IA_IDXREG; rr_uop.idx.a_reg = 0;
      rr_uop.idx.b_sel = IA_DEC; rr_uop.idx.b_val = 16'd9; rr_uop.idx.we = 1'b1; rr_uop.idx.wr_reg = 0;
      rr_fire = 1'b1;
      @(posedge clk);
    end
    @(negedge clk) rr_fire = 1'b0;
    rr_uop = '0; rr_uop.src1 = csrc(SRC_IDX, SEW64, 1'b0); rr_uop.idx.a_sel = IA_IDXREG; rr_uop.idx.a_reg = 0;
    #1 chk("index register accumulates", op1, 64'd18);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
