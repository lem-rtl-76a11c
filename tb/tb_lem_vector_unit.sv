// tb_lem_vector_unit: end-to-end test of the vector unit at its default size.
//
// Runs a short vector program through the unit and compares the register file,
// the scalar write-backs and memory with values computed here from the input
// data. Around the unit it models a tagged memory (random request back-
// pressure, 2..9 cycle in-order responses, one address that reports a fault)
// and a pipelined double-precision FPU (real arithmetic, 4 cycles).
// It also counts how often each mechanism happened (scoreboard wait, masked
// micro-op, memory back-pressure, reduction-queue wait, write-port-2 conflict,
// fault-only-first truncation, trap, saturation, pass-through, illegal
// instruction, gather out of range) and counts a failure for any that never
// did. A watchdog ends the run.
module tb_lem_vector_unit;
  import lem_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // ------------------------------------------------------------ DUT
  logic in_valid, in_ready, pass_valid, illegal, busy, xwb_valid;
  logic [31:0] in_instr, pass_instr;
  logic [63:0] in_rs1, in_rs2, in_frs1, xwb_data;
  logic [4:0]  xwb_rd;
  logic mem_req_valid, mem_req_ready, mem_req_store, mem_resp_valid, mem_resp_ready, mem_resp_error;
  logic [63:0] mem_req_addr, mem_req_data, mem_resp_data;
  sew_e mem_req_size;
  rdtag_t mem_req_tag, mem_resp_tag, fp_req_tag, fp_resp_tag;
  logic fp_req_valid, fp_req_ready, fp_resp_valid, fp_resp_ready;
  fp_fn_e fp_req_fn;
  logic [63:0] fp_req_a, fp_req_b, fp_req_c, fp_resp_data;
  logic flush, replay, vstart_we, vxrm_we, vxsat, trap, sb_stall;
  logic [VL_W-1:0] vstart_wdata;
  logic [1:0] vxrm_wdata;
  vcsr_t csr;
  logic [VLEN-1:0] vr [NVREG];

  lem_vector_unit dut (
    .clk, .rst_n, .in_valid, .in_instr, .in_rs1, .in_rs2, .in_frs1, .in_ready,
    .pass_valid, .pass_instr, .illegal, .busy, .xwb_valid, .xwb_rd, .xwb_data,
    .mem_req_valid, .mem_req_ready, .mem_req_addr, .mem_req_store, .mem_req_size,
    .mem_req_data, .mem_req_tag, .mem_resp_valid, .mem_resp_ready, .mem_resp_tag,
    .mem_resp_data, .mem_resp_error,
    .fp_req_valid, .fp_req_ready, .fp_req_fn, .fp_req_a, .fp_req_b, .fp_req_c, .fp_req_tag,
    .fp_resp_valid, .fp_resp_ready, .fp_resp_tag, .fp_resp_data,
    .flush, .replay, .vstart_we, .vstart_wdata, .vxrm_we, .vxrm_wdata,
    .csr, .vxsat, .trap, .sb_stall, .dbg_vreg(vr)
  );

  // ------------------------------------------------------------ memory model
  localparam int MEMSZ = 4096;
  localparam logic [63:0] ERR_ADDR = 64'h0E10;
  logic [7:0] mem [MEMSZ];
  typedef struct { rdtag_t tag; logic [63:0] data; logic err; int due; } mresp_t;
  mresp_t mq [$];

  function automatic logic [63:0] mrd(logic [63:0] a, sew_e sz);
    logic [63:0] v = '0;
    for (int b = 0; b < (1 << sz); b++) v[b*8 +: 8] = mem[(a + b) % MEMSZ];
    return v;
  endfunction

  always_ff @(posedge clk) mem_req_ready <= ($urandom_range(0, 3) != 0);

  always @(posedge clk) if (rst_n) begin
    if (mem_req_valid && mem_req_ready) begin
      if (mem_req_store) begin
        for (int b = 0; b < (1 << mem_req_size); b++) mem[(mem_req_addr + b) % MEMSZ] = mem_req_data[b*8 +: 8];
      end else begin
        mresp_t r;
        r.tag  = mem_req_tag;
        r.data = mrd(mem_req_addr, mem_req_size);
        r.err  = (mem_req_addr == ERR_ADDR);
        r.due  = cyc + $urandom_range(2, 9);
        if (mq.size() > 0 && mq[$].due > r.due) r.due = mq[$].due;
        mq.push_back(r);
      end
    end
    if (mem_resp_valid && mem_resp_ready) void'(mq.pop_front());
  end
  always_comb begin
    mem_resp_valid = (mq.size() > 0) && (mq[0].due <= cyc);
    mem_resp_tag   = (mq.size() > 0) ? mq[0].tag  : '0;
    mem_resp_data  = (mq.size() > 0) ? mq[0].data : '0;
    mem_resp_error = (mq.size() > 0) ? mq[0].err  : 1'b0;
  end

  // ------------------------------------------------------------ FPU model
  typedef struct { rdtag_t tag; logic [63:0] data; int due; } fresp_t;
  fresp_t fq [$];
  assign fp_req_ready = (fq.size() < 4);
  always @(posedge clk) if (rst_n) begin
    if (fp_req_valid && fp_req_ready) begin
      fresp_t r;
      real a, b, c, y;
      a = $bitstoreal(fp_req_a); b = $bitstoreal(fp_req_b); c = $bitstoreal(fp_req_c);
      case (fp_req_fn)
        FP_ADD:  y = a + b;
        FP_SUB:  y = a - b;
        FP_MUL:  y = a * b;
        FP_MACC: y = a * b + c;
        FP_MIN:  y = (a < b) ? a : b;
        default: y = (a > b) ? a : b;
      endcase
      r.tag = fp_req_tag; r.data = $realtobits(y); r.due = cyc + 4;
      fq.push_back(r);
    end
    if (fp_resp_valid && fp_resp_ready) void'(fq.pop_front());
  end
  always_comb begin
    fp_resp_valid = (fq.size() > 0) && (fq[0].due <= cyc);
    fp_resp_tag   = (fq.size() > 0) ? fq[0].tag  : '0;
    fp_resp_data  = (fq.size() > 0) ? fq[0].data : '0;
  end

  // ------------------------------------------------------------ event counters
  int n_msat = 0;
  int n_sbwait = 0, n_kill = 0, n_memstall = 0, n_rqwait = 0, n_p2conf = 0, n_ff = 0, n_trap = 0,
      n_sat = 0, n_pass = 0, n_illegal = 0, n_oob = 0;
  logic [63:0] xr [32];
  always @(posedge clk) if (rst_n) begin
    if (sb_stall) n_sbwait++;
    if (dut.rr_fire && dut.rd_kill) n_kill++;
    if (mem_req_valid && !mem_req_ready) n_memstall++;
    if (dut.ex_is_fp && dut.ex_fp_wait) n_rqwait++;
    if (mem_resp_valid && !mem_resp_ready) n_p2conf++;
    if (dut.csr_term) n_ff++;
    if (trap) n_trap++;
    if (dut.alu_vxsat) n_sat++;
    if (dut.mul_sat) n_msat++;
    if (pass_valid) n_pass++;
    if (illegal) n_illegal++;
    if (dut.rr_fire && dut.rr_uop.idx.cmp_en && !dut.rd_cbit) n_oob++;
    if (xwb_valid) xr[xwb_rd] = xwb_data;
  end

  // ------------------------------------------------------------ encoders
  function automatic logic [31:0] opv(logic [5:0] f6, logic vm, logic [4:0] vs2, logic [4:0] vs1,
                                      logic [2:0] f3, logic [4:0] vd);
    return {f6, vm, vs2, vs1, f3, vd, 7'b1010111};
  endfunction
  function automatic logic [31:0] vsetvli(logic [4:0] rd, logic [4:0] rs1, logic [2:0] sew, logic [2:0] lmul);
    return {1'b0, 3'b000, 2'b00, 3'(sew), lmul, rs1, 3'b111, rd, 7'b1010111};
  endfunction
  function automatic logic [31:0] vsetivli(logic [4:0] rd, logic [4:0] uimm, logic [2:0] sew, logic [2:0] lmul);
    return {2'b11, 2'b00, 2'b00, sew, lmul, uimm, 3'b111, rd, 7'b1010111};
  endfunction
  function automatic logic [31:0] vld(logic [1:0] mop, logic vm, logic [4:0] f2, logic [2:0] w, logic [4:0] vd);
    return {3'b000, 1'b0, mop, vm, f2, 5'd1, w, vd, 7'b0000111};
  endfunction
  function automatic logic [31:0] vst(logic [1:0] mop, logic vm, logic [4:0] f2, logic [2:0] w, logic [4:0] vs3);
    return {3'b000, 1'b0, mop, vm, f2, 5'd1, w, vs3, 7'b0100111};
  endfunction

  task automatic issue(logic [31:0] ins, logic [63:0] rs1 = 0, logic [63:0] rs2 = 0, logic [63:0] frs1 = 0);
    @(negedge clk);
    in_valid = 1'b1; in_instr = ins; in_rs1 = rs1; in_rs2 = rs2; in_frs1 = frs1;
    #1;
    while (!in_ready) begin @(negedge clk); #1; end
    @(negedge clk);
    in_valid = 1'b0;
  endtask

  task automatic drain();
    do @(posedge clk); while (busy);
    repeat (40) @(posedge clk);
  endtask

  function automatic logic [63:0] el(int r, int i, int sew);
    logic [63:0] m = (sew == 64) ? '1 : ((64'(1) << sew) - 1);
    return (vr[r + (i * sew) / VLEN] >> ((i * sew) % VLEN)) & m;
  endfunction

  task automatic chk(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  function automatic logic [63:0] m64(int a);
    return mrd(64'(a), SEW64);
  endfunction

  // ------------------------------------------------------------ program
  logic [63:0] a [4], b [4], e;
  logic [7:0]  bb [8];
  real fa [4], fb [4], fs;
  int start_cyc, ops_cyc;

  initial begin
    in_valid = 0; in_instr = 0; in_rs1 = 0; in_rs2 = 0; in_frs1 = 0;
    flush = 0; replay = 0; vstart_we = 0; vstart_wdata = 0; vxrm_we = 0; vxrm_wdata = 0;
    for (int k = 0; k < 32; k++) xr[k] = '0;
    for (int k = 0; k < MEMSZ; k++) mem[k] = 8'($urandom);
    // integer vectors at 0x100 and 0x200, index vector at 0x400, FP at 0x500/0x600
    for (int k = 0; k < 4; k++) begin
      a[k] = {$urandom, $urandom}; b[k] = {$urandom, $urandom};
      if (k == 1) b[k] = a[k];
      for (int y = 0; y < 8; y++) begin mem[256 + k*8 + y] = a[k][y*8 +: 8]; mem[512 + k*8 + y] = b[k][y*8 +: 8]; end
      fa[k] = 1.5 * (k + 1); fb[k] = 0.25 - k;
      for (int y = 0; y < 8; y++) begin
        mem[1280 + k*8 + y] = $realtobits(fa[k]) >> (y*8);
        mem[1536 + k*8 + y] = $realtobits(fb[k]) >> (y*8);
      end
    end
    for (int y = 0; y < 32; y++) mem[1024 + y] = 0;
    mem[1024 + 0] = 8'd3; mem[1024 + 8] = 8'd0; mem[1024 + 16] = 8'd100; mem[1024 + 24] = 8'd1;
    for (int k = 0; k < 8; k++) begin bb[k] = 8'(60 * k); mem[1792 + k] = bb[k]; end

    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);

    // vsetvli x5, x10(=4), e64, m1
    issue(vsetvli(5'd5, 5'd10, 3'd3, 3'd0), 64'd4);
    drain();
    chk("vsetvli vl", 64'(csr.vl), 64'd4);
    chk("vsetvli rd", xr[5], 64'd4);

    // vle64 v1, (0x100); vle64 v2, (0x200); vadd.vv v3, v1, v2 (waits on scoreboard)
    issue(vld(2'b00, 1'b1, 5'd0, 3'b111, 5'd1), 64'h100);
    issue(vld(2'b00, 1'b1, 5'd0, 3'b111, 5'd2), 64'h200);
    start_cyc = cyc;
    issue(opv(6'b000000, 1'b1, 5'd1, 5'd2, 3'b000, 5'd3));
    // vsub.vx v4, v3, x(=5)
    issue(opv(6'b000010, 1'b1, 5'd3, 5'd0, 3'b100, 5'd4), 64'd5);
    // vmul.vv v5, v1, v2 ; vmacc.vv v5, v1, v2
    issue(opv(6'b100101, 1'b1, 5'd1, 5'd2, 3'b010, 5'd5));
    issue(opv(6'b101101, 1'b1, 5'd1, 5'd2, 3'b010, 5'd5));
    // vmslt.vv v6, v2, v1  (v6[i] = v2[i] < v1[i] signed)
    issue(opv(6'b011011, 1'b1, 5'd2, 5'd1, 3'b000, 5'd6));
    drain();
    for (int k = 0; k < 4; k++) begin
      chk($sformatf("vle v1[%0d]", k), el(1, k, 64), a[k]);
      chk($sformatf("vadd v3[%0d]", k), el(3, k, 64), a[k] + b[k]);
      chk($sformatf("vsub.vx v4[%0d]", k), el(4, k, 64), a[k] + b[k] - 5);
      chk($sformatf("vmacc v5[%0d]", k), el(5, k, 64), 2 * (a[k] * b[k]));
      chk($sformatf("vmslt v6[%0d]", k), 64'(vr[6][k]), 64'($signed(b[k]) < $signed(a[k])));
    end

    // v0 = 0b1010 via vmv.s.x; vadd.vi v7, v1, -3, v0.t (v7 starts at zero)
    issue(opv(6'b010000, 1'b1, 5'd0, 5'd0, 3'b110, 5'd0), 64'b1010);
    issue(opv(6'b000000, 1'b0, 5'd1, 5'b11101, 3'b011, 5'd7));
    // vredsum.vs v8, v1, v9 (v9 = 0) ; vcpop.m x7, v6 ; vfirst.m x8, v6
    issue(opv(6'b000000, 1'b1, 5'd1, 5'd9, 3'b010, 5'd8));
    issue(opv(6'b010000, 1'b1, 5'd6, 5'b10000, 3'b010, 5'd7));
    issue(opv(6'b010000, 1'b1, 5'd6, 5'b10001, 3'b010, 5'd8));
    // vid.v v15 ; viota.m v14, v6 ; vmv.x.s x9, v3
    issue(opv(6'b010100, 1'b1, 5'd0, 5'b10001, 3'b010, 5'd15));
    issue(opv(6'b010100, 1'b1, 5'd6, 5'b10000, 3'b010, 5'd14));
    issue(opv(6'b010000, 1'b1, 5'd3, 5'b00000, 3'b010, 5'd9));
    drain();
    e = '0;
    for (int k = 0; k < 4; k++) begin
      chk($sformatf("masked vadd.vi v7[%0d]", k), el(7, k, 64), (k % 2 == 1) ? a[k] - 3 : 64'd0);
      e += a[k];
      chk($sformatf("vid v15[%0d]", k), el(15, k, 64), 64'(k));
    end
    chk("vredsum", el(8, 0, 64), e);
    begin
      automatic int pc = 0, ff = -1, run = 0;
      for (int k = 0; k < 4; k++) begin
        chk($sformatf("viota v14[%0d]", k), el(14, k, 64), 64'(run));
        if (vr[6][k]) begin pc++; run++; if (ff < 0) ff = k; end
      end
      chk("vcpop", xr[7], 64'(pc));
      chk("vfirst", xr[8], 64'(longint'(ff)));
    end
    chk("vmv.x.s", xr[9], a[0] + b[0]);

    // gather: vle64 v11 <- indices {3,0,100,1}; vrgather.vv v10, v1, v11
    issue(vld(2'b00, 1'b1, 5'd0, 3'b111, 5'd11), 64'h400);
    issue(opv(6'b001100, 1'b1, 5'd1, 5'd11, 3'b000, 5'd10));
    // vslidedown.vi v12, v1, 1 ; vslideup.vx v13, v1, x(=2)
    issue(opv(6'b001111, 1'b1, 5'd1, 5'd1, 3'b011, 5'd12));
    issue(opv(6'b001110, 1'b1, 5'd1, 5'd0, 3'b100, 5'd13), 64'd2);
    // vse64 v3 -> 0x300 ; vlse64 v16, (0x100), stride 16 ; vluxei64 v9, (0x100), v11
    issue(vst(2'b00, 1'b1, 5'd0, 3'b111, 5'd3), 64'h300);
    issue(vld(2'b10, 1'b1, 5'd2, 3'b111, 5'd16), 64'h100, 64'd16);
    issue(vld(2'b01, 1'b1, 5'd11, 3'b111, 5'd9), 64'h100);
    drain();
    chk("vrgather[0]", el(10, 0, 64), a[3]);
    chk("vrgather[1]", el(10, 1, 64), a[0]);
    chk("vrgather[2] out of range", el(10, 2, 64), 64'd0);
    chk("vrgather[3]", el(10, 3, 64), a[1]);
    for (int k = 0; k < 4; k++) begin
      chk($sformatf("vslidedown[%0d]", k), el(12, k, 64), (k < 3) ? a[k+1] : 64'd0);
      chk($sformatf("vslideup[%0d]", k), el(13, k, 64), (k >= 2) ? a[k-2] : 64'd0);
      chk($sformatf("vse64 mem[%0d]", k), m64(768 + 8*k), a[k] + b[k]);
    end
    // strided: elements at 0x100 + 16*k
    chk("vlse64[0]", el(16, 0, 64), a[0]);
    chk("vlse64[1]", el(16, 1, 64), a[2]);
    chk("vlse64[2]", el(16, 2, 64), m64(256 + 32));
    chk("vlse64[3]", el(16, 3, 64), m64(256 + 48));
    chk("vluxei64[0]", el(9, 0, 64), m64(256 + 3));
    chk("vluxei64[1]", el(9, 1, 64), m64(256 + 0));
    chk("vluxei64[2]", el(9, 2, 64), m64(256 + 100));
    chk("vluxei64[3]", el(9, 3, 64), m64(256 + 1));

    // FP: vle64 v21 (0x500), v22 (0x600); vfadd.vv v20, v22, v21; vfredosum.vs v23, v21, v24(=0)
    issue(vld(2'b00, 1'b1, 5'd0, 3'b111, 5'd21), 64'h500);
    issue(vld(2'b00, 1'b1, 5'd0, 3'b111, 5'd22), 64'h600);
    issue(opv(6'b000000, 1'b1, 5'd22, 5'd21, 3'b001, 5'd20));
    issue(opv(6'b000011, 1'b1, 5'd21, 5'd24, 3'b001, 5'd23));
    // vfmul.vf v25, v21, f(=2.0)
    issue(opv(6'b100100, 1'b1, 5'd21, 5'd0, 3'b101, 5'd25), 0, 0, $realtobits(2.0));
    drain();
    fs = 0.0;
    for (int k = 0; k < 4; k++) begin
      chk($sformatf("vfadd[%0d]", k), el(20, k, 64), $realtobits(fb[k] + fa[k]));
      chk($sformatf("vfmul.vf[%0d]", k), el(25, k, 64), $realtobits(fa[k] * 2.0));
      fs = fs + fa[k];
    end
    chk("vfredosum", el(23, 0, 64), $realtobits(0.0 + fs));

    // load followed by independent multiplies: both long-latency units compete
    // for write port 2
    issue(vld(2'b00, 1'b1, 5'd0, 3'b111, 5'd18), 64'h200);
    issue(opv(6'b100101, 1'b1, 5'd1, 5'd2, 3'b010, 5'd19));
    issue(opv(6'b100101, 1'b1, 5'd2, 5'd1, 3'b010, 5'd17));
    drain();
    for (int k = 0; k < 4; k++) begin
      chk($sformatf("vle v18[%0d]", k), el(18, k, 64), b[k]);
      chk($sformatf("vmul v19[%0d]", k), el(19, k, 64), a[k] * b[k]);
      chk($sformatf("vmul v17[%0d]", k), el(17, k, 64), a[k] * b[k]);
    end

    // mask logic: vmnand.mm v26, v6, v0 ; vmsbf.m v27, v6
    issue(opv(6'b011101, 1'b1, 5'd6, 5'd0, 3'b010, 5'd26));
    issue(opv(6'b010100, 1'b1, 5'd6, 5'b00001, 3'b010, 5'd27));
    drain();
    begin
      logic [3:0] m6, exp_sbf;
      logic seen;
      m6 = vr[6][3:0];
      chk("vmnand.mm", 64'(vr[26][3:0]), 64'(4'(~(m6 & vr[0][3:0]))));
      seen = 1'b0;
      for (int k = 0; k < 4; k++) begin
        if (m6[k]) seen = 1'b1;
        exp_sbf[k] = !seen;
      end
      chk("vmsbf.m", 64'(vr[27][3:0]), 64'(exp_sbf));
    end

    // SEW=8, vl=8: vle8 v28 (0x700); vsaddu.vx v29, v28, x(=200)
    issue(vsetivli(5'd6, 5'd8, 3'd0, 3'd0));
    issue(vld(2'b00, 1'b1, 5'd0, 3'b000, 5'd28), 64'h700);
    issue(opv(6'b100000, 1'b1, 5'd28, 5'd0, 3'b100, 5'd29), 64'd200);
    drain();
    chk("vsetivli vl", xr[6], 64'd8);
    for (int k = 0; k < 8; k++)
      chk($sformatf("vsaddu e8[%0d]", k), el(29, k, 8), (int'(bb[k]) + 200 > 255) ? 64'd255 : 64'(bb[k] + 8'd200));
    chk("vxsat", 64'(vxsat), 64'd1);
    // vsmul.vv v31, v28, v29 (rnu): (a*b + 64) >> 7, clipped; then
    // vmv.v.x v30, x(=-128); vsmul.vv v30, v30, v30: (-128)^2 saturates to 127
    issue(opv(6'b100111, 1'b1, 5'd28, 5'd29, 3'b000, 5'd31));
    issue(opv(6'b010111, 1'b1, 5'd0, 5'd0, 3'b100, 5'd30), 64'hFFFF_FFFF_FFFF_FF80);
    issue(opv(6'b100111, 1'b1, 5'd30, 5'd30, 3'b000, 5'd30));
    drain();
    for (int k = 0; k < 8; k++) begin
      automatic int pa = int'($signed(bb[k]));
      automatic int pb = int'($signed(8'(el(29, k, 8))));
      automatic int pr = (pa * pb + 64) >>> 7;
      if (pr > 127) pr = 127;
      chk($sformatf("vsmul e8[%0d]", k), el(31, k, 8), 64'(8'(pr)) & 64'hFF);
      chk($sformatf("vsmul sat e8[%0d]", k), el(30, k, 8), 64'd127);
    end
    // vaadd.vx v31, v28, x(=-7), vxrm = rnu: (a - 7 + 1) >>> 1
    issue(opv(6'b001001, 1'b1, 5'd28, 5'd1, 3'b110, 5'd31), 64'hFFFF_FFFF_FFFF_FFF9);
    drain();
    for (int k = 0; k < 8; k++) begin
      automatic int pa = int'($signed(bb[k]));
      chk($sformatf("vaadd e8[%0d]", k), el(31, k, 8), 64'(8'((pa - 7 + 1) >>> 1)) & 64'hFF);
    end

    // fault-only-first: e64, vl=4, vle64ff v30 at ERR_ADDR - 16 -> fault at element 2
    issue(vsetvli(5'd0, 5'd10, 3'd3, 3'd0), 64'd4);
    issue(vld(2'b00, 1'b1, 5'b10000, 3'b111, 5'd30), ERR_ADDR - 16);
    drain();
    chk("vleff vl", 64'(csr.vl), 64'd2);
    chk("vleff v30[0]", el(30, 0, 64), m64(int'(ERR_ADDR) - 16));
    chk("vleff v30[1]", el(30, 1, 64), m64(int'(ERR_ADDR) - 8));
    // plain load that faults at element 1 -> trap, vstart = 1
    issue(vld(2'b00, 1'b1, 5'd0, 3'b111, 5'd31), ERR_ADDR - 8);
    drain();
    chk("trap vstart", 64'(csr.vstart), 64'd1);
    vstart_we = 1'b1; @(posedge clk); #1 vstart_we = 1'b0;

    // pass-through of a scalar instruction and an illegal vector instruction
    issue(32'h00B50533);                                    // add a0, a0, a1
    issue(vsetvli(5'd0, 5'd10, 3'd3, 3'd1), 64'd8);         // e64, m2
    issue(opv(6'b000000, 1'b1, 5'd2, 5'd4, 3'b000, 5'd3));  // vadd v3 with LMUL=2: misaligned
    drain();

    ops_cyc = cyc - start_cyc;
    // mechanisms
    chk("pass-through seen", 64'(n_pass > 0), 1);
    chk("illegal seen", 64'(n_illegal > 0), 1);
    chk("scoreboard wait seen", 64'(n_sbwait > 0), 1);
    chk("masked-off micro-op seen", 64'(n_kill > 0), 1);
    chk("memory back-pressure seen", 64'(n_memstall > 0), 1);
    chk("reduction-queue wait seen", 64'(n_rqwait > 0), 1);
    chk("fault-only-first truncation seen", 64'(n_ff > 0), 1);
    chk("trap seen", 64'(n_trap > 0), 1);
    chk("saturation seen", 64'(n_sat > 0), 1);
    chk("multiplier saturation seen", 64'(n_msat > 0), 1);
    chk("gather out-of-range seen", 64'(n_oob > 0), 1);
    chk("write-port-2 conflict seen", 64'(n_p2conf > 0), 1);
    $display("events: sbwait=%0d kill=%0d memstall=%0d rqwait=%0d p2conflict=%0d ff=%0d trap=%0d sat=%0d pass=%0d illegal=%0d oob=%0d msat=%0d",
             n_sbwait, n_kill, n_memstall, n_rqwait, n_p2conf, n_ff, n_trap, n_sat, n_pass, n_illegal, n_oob, n_msat);
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
