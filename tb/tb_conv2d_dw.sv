// tb_conv2d_dw: depthwise 2-D convolution workload on the vector unit at its
// default size.
//
// 4 channels, 3x3 filter, 56x56 output per channel (the size the original
// evaluation uses), input 58x58 per channel (no padding), all doubles, row-
// major, channel after channel. For each channel, output row and strip of up
// to VLMAX outputs (SEW=64, LMUL=8: 32 then 24), the accumulator group v8 is
// cleared with vmv.v.i, then for each of the 9 filter taps a unit-stride load
// brings the shifted input strip into v16 or v24 (alternating) and vfmacc.vf
// adds the tap weight times it to v8; the strip is stored with vse64. The FPU
// model computes a*b + c in double precision; the reference here does the same
// in the same order, so all 12544 outputs must match bit for bit. The memory
// model has random back-pressure and 2..9 cycle in-order responses. The run
// reports the cycle count.
module tb_conv2d_dw;
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
  localparam int MEMSZ = 262144;
  logic [7:0] mem [MEMSZ];
  typedef struct { rdtag_t tag; logic [63:0] data; int due; } mresp_t;
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
    mem_resp_error = 1'b0;
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

  // ------------------------------------------------------------ helpers
  function automatic logic [31:0] opv(logic [5:0] f6, logic vm, logic [4:0] vs2, logic [4:0] vs1,
                                      logic [2:0] f3, logic [4:0] vd);
    return {f6, vm, vs2, vs1, f3, vd, 7'b1010111};
  endfunction
  function automatic logic [31:0] vsetvli(logic [4:0] rd, logic [4:0] rs1, logic [2:0] sew, logic [2:0] lmul);
    return {1'b0, 3'b000, 2'b00, 3'(sew), lmul, rs1, 3'b111, rd, 7'b1010111};
  endfunction
  function automatic logic [31:0] vld(logic [1:0] mop, logic [2:0] w, logic [4:0] vd);
    return {3'b000, 1'b0, mop, 1'b1, (mop == 2'b00) ? 5'd0 : 5'd2, 5'd1, w, vd, 7'b0000111};
  endfunction
  function automatic logic [31:0] vst(logic [2:0] w, logic [4:0] vs3);
    return {3'b000, 1'b0, 2'b00, 1'b1, 5'd0, 5'd1, w, vs3, 7'b0100111};
  endfunction

  task automatic issue(logic [31:0] ins, logic [63:0] rs1 = 0, logic [63:0] rs2 = 0, logic [63:0] frs1 = 0);
    @(negedge clk);
    in_valid = 1'b1; in_instr = ins; in_rs1 = rs1; in_rs2 = rs2; in_frs1 = frs1;
    #1;
    while (!in_ready) begin @(negedge clk); #1; end
    @(negedge clk);
    in_valid = 1'b0;
  endtask

  task automatic chk(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  int n_ill = 0;
  always @(posedge clk) if (rst_n && illegal) n_ill++;

  // ------------------------------------------------------------ kernel
  localparam int C = 4, H = 56, W = 56, K = 3, HI = H + K - 1, WI = W + K - 1;
  localparam logic [63:0] I_BASE = 64'h00000, O_BASE = 64'h20000;
  real ir [C][HI][WI];
  real wr [C][K][K];
  real acc;
  int  t0, x0, vl, col_reg;

  function automatic logic [63:0] iaddr(int c, int y, int x);
    return I_BASE + 64'(((c * HI + y) * WI + x) * 8);
  endfunction
  function automatic logic [63:0] oaddr(int c, int y, int x);
    return O_BASE + 64'(((c * H + y) * W + x) * 8);
  endfunction

  initial begin
    in_valid = 0; in_instr = 0; in_rs1 = 0; in_rs2 = 0; in_frs1 = 0;
    flush = 0; replay = 0; vstart_we = 0; vstart_wdata = 0; vxrm_we = 0; vxrm_wdata = 0;
    for (int k = 0; k < MEMSZ; k++) mem[k] = 8'h0;
    for (int c = 0; c < C; c++) begin
      for (int y = 0; y < HI; y++)
        for (int x = 0; x < WI; x++) begin
          ir[c][y][x] = real'(int'($urandom_range(0, 2000)) - 1000) / 64.0;
          for (int b = 0; b < 8; b++) mem[iaddr(c, y, x) + 64'(b)] = $realtobits(ir[c][y][x])[b*8 +: 8];
        end
      for (int ky = 0; ky < K; ky++)
        for (int kx = 0; kx < K; kx++) wr[c][ky][kx] = real'(int'($urandom_range(0, 200)) - 100) / 16.0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);

    t0 = cyc;
    col_reg = 16;
    for (int c = 0; c < C; c++)
      for (int y = 0; y < H; y++) begin
        x0 = 0;
        while (x0 < W) begin
          // vsetvli x5, x10(=outputs left in the row), e64, m8
          issue(vsetvli(5'd5, 5'd10, 3'd3, 3'd3), 64'(W - x0));
          // vmv.v.i v8, 0
          issue(opv(6'b010111, 1'b1, 5'd0, 5'd0, 3'b011, 5'd8));
          for (int ky = 0; ky < K; ky++)
            for (int kx = 0; kx < K; kx++) begin
              issue(vld(2'b00, 3'b111, 5'(col_reg)), iaddr(c, y + ky, x0 + kx));
              issue(opv(6'b101100, 1'b1, 5'(col_reg), 5'd1, 3'b101, 5'd8), 0, 0, $realtobits(wr[c][ky][kx]));
              col_reg = (col_reg == 16) ? 24 : 16;
            end
          issue(vst(3'b111, 5'd8), oaddr(c, y, x0));
          do @(posedge clk); while (busy);
          vl = int'(csr.vl);
          if (vl == 0) begin chk("strip length", 0, 1); break; end
          x0 += vl;
        end
      end
    do @(posedge clk); while (busy);
    repeat (40) @(posedge clk);
    $display("conv2d-depthwise %0dch %0dx%0d filter %0dx%0d output: %0d cycles, %0d flops",
             C, K, K, H, W, cyc - t0, 2 * C * H * W * K * K);

    for (int c = 0; c < C; c++)
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++) begin
          acc = 0.0;
          for (int ky = 0; ky < K; ky++)
            for (int kx = 0; kx < K; kx++) acc = wr[c][ky][kx] * ir[c][y + ky][x + kx] + acc;
          chk($sformatf("out[%0d][%0d][%0d]", c, y, x), mrd(oaddr(c, y, x), SEW64), $realtobits(acc));
        end
    chk("no illegal instruction", 64'(n_ill), 64'd0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
