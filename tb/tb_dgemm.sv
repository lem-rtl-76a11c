// tb_dgemm: DGEMM workload on the vector unit at its default size.
//
// Computes C = A * B for 43 x 43 row-major matrices of doubles (the size the
// original evaluation uses) with a row-wise vector kernel: for each row i of C
// and each strip of up to VLMAX columns (SEW=64, LMUL=8, so 32 then 11), the
// accumulator group v8 is cleared with vmv.v.i, then for every k a unit-stride
// load brings the strip of row k of B into v16 or v24 (alternating, so a load
// can overlap the previous multiply-add) and vfmacc.vf adds A[i][k] times it to
// v8; the strip is stored with vse64. The FPU model computes a*b + c in double
// precision; the reference here does the same in the same order, so all 1849
// results must match bit for bit. The memory model has random back-pressure
// and 2..9 cycle in-order responses. The run reports the cycle count.
module tb_dgemm;
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
  localparam int MEMSZ = 65536;
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
  localparam int N = 43;
  localparam logic [63:0] A_BASE = 64'h0000, B_BASE = 64'h4000, C_BASE = 64'h8000;
  real ar [N][N];
  real br [N][N];
  real cr;
  int  t0, col, vl, col_reg;

  initial begin
    in_valid = 0; in_instr = 0; in_rs1 = 0; in_rs2 = 0; in_frs1 = 0;
    flush = 0; replay = 0; vstart_we = 0; vstart_wdata = 0; vxrm_we = 0; vxrm_wdata = 0;
    for (int k = 0; k < MEMSZ; k++) mem[k] = 8'h0;
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        ar[i][j] = real'(int'($urandom_range(0, 2000)) - 1000) / 64.0;
        br[i][j] = real'(int'($urandom_range(0, 2000)) - 1000) / 32.0;
        for (int b = 0; b < 8; b++) begin
          mem[A_BASE + 64'((i * N + j) * 8 + b)] = $realtobits(ar[i][j])[b*8 +: 8];
          mem[B_BASE + 64'((i * N + j) * 8 + b)] = $realtobits(br[i][j])[b*8 +: 8];
        end
      end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);

    t0 = cyc;
    col_reg = 16;
    for (int i = 0; i < N; i++) begin
      col = 0;
      while (col < N) begin
        // vsetvli x5, x10(=columns left), e64, m8
        issue(vsetvli(5'd5, 5'd10, 3'd3, 3'd3), 64'(N - col));
        // vmv.v.i v8, 0
        issue(opv(6'b010111, 1'b1, 5'd0, 5'd0, 3'b011, 5'd8));
        for (int k = 0; k < N; k++) begin
          // vle64 v16/v24, (B + (k*N + col)*8)
          issue(vld(2'b00, 3'b111, 5'(col_reg)), B_BASE + 64'((k * N + col) * 8));
          // vfmacc.vf v8, A[i][k], v16/v24
          issue(opv(6'b101100, 1'b1, 5'(col_reg), 5'd1, 3'b101, 5'd8), 0, 0, $realtobits(ar[i][k]));
          col_reg = (col_reg == 16) ? 24 : 16;
        end
        // vse64 v8, (C + (i*N + col)*8)
        issue(vst(3'b111, 5'd8), C_BASE + 64'((i * N + col) * 8));
        do @(posedge clk); while (busy);
        vl = int'(csr.vl);
        chk("strip length", 64'(vl), 64'((N - col) > 32 ? 32 : (N - col)));
        col += vl;
        if (vl == 0) break;
      end
    end
    do @(posedge clk); while (busy);
    repeat (40) @(posedge clk);
    $display("dgemm %0d: %0d cycles, %0d flops", N, cyc - t0, 2 * N * N * N);

    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        cr = 0.0;
        for (int k = 0; k < N; k++) cr = ar[i][k] * br[k][j] + cr;
        chk($sformatf("C[%0d][%0d]", i, j), mrd(C_BASE + 64'((i * N + j) * 8), SEW64), $realtobits(cr));
      end

    chk("no illegal instruction", 64'(n_ill), 64'd0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
