// tb_lem_expander: self-checking test of the microcode expander.
//
// Two small decoder extensions are modelled here:
//  * extension 0 recognises opcode 0001011; the instruction itself carries the
//    outer start [11:8], the outer end [15:12] and the inner length [19:16];
//    bit 20 makes it illegal, bit 21 raises a hazard wait for a few cycles.
//  * extension 1 recognises opcodes 0001011 (shadowed by extension 0, so it
//    checks the priority) and 0101011; for the latter the inner loop has three
//    steps, odd outer values leave it after step 1 (next_outer) and outer value
//    2 branches from step 2 back to step 1 once.
// Each extension reports the counters in the micro-op (elem = outer counter,
// xrd = inner counter, imm = extension number). The testbench works out the
// expected counter sequence for each instruction, holds uop_ready low at
// random, and compares every accepted micro-op, including first/last. It also
// checks pass-through of other opcodes, the illegal pulse, the hazard wait and
// that terminate ends a sequence at once.
module tb_lem_expander;
  import lem_pkg::*;
  import lem_ext_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic            in_valid, in_ready, pass_valid, illegal, uop_valid, uop_ready, terminate, flush, busy;
  logic [31:0]     in_instr, pass_instr, cur_instr;
  logic [XLEN-1:0] in_rs1, cur_rs1, cur_rs2, cur_frs1;
  ext_req_t        ext_req;
  ext_resp_t       ext_resp [2];
  uop_t            uop;
  logic            hazard;

  lem_expander #(.N_EXT(2)) dut (
    .clk, .rst_n, .in_valid, .in_instr, .in_rs1, .in_rs2(in_rs1 + 1), .in_frs1(in_rs1 + 2), .in_ready,
    .pass_valid, .pass_instr, .illegal, .ext_req, .ext_resp, .uop_valid, .uop, .uop_ready,
    .cur_instr, .cur_rs1, .cur_rs2, .cur_frs1, .terminate, .flush, .busy
  );

  // ------------------------------------------------------------ extension models
  logic branched;   // extension 1 takes its branch once per instruction
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) branched <= 1'b0;
    else if (!busy) branched <= 1'b0;
    else if (uop_valid && uop_ready && ext_resp[1].branch) branched <= 1'b1;

  always_comb begin
    for (int e = 0; e < 2; e++) begin
      ext_resp[e] = '0;
      ext_resp[e].uop.valid = 1'b1;
      ext_resp[e].uop.elem  = ext_req.outer;
      ext_resp[e].uop.xrd   = ext_req.inner[4:0];
      ext_resp[e].uop.imm   = 5'(e);
    end
    ext_resp[0].recognized  = ext_req.instr[6:0] == 7'b0001011;
    ext_resp[0].illegal     = ext_req.instr[20];
    ext_resp[0].wait_hazard = ext_req.instr[21] && hazard;
    ext_resp[0].outer_init  = CNT_W'(ext_req.instr[11:8]);
    ext_resp[0].outer_end   = CNT_W'(ext_req.instr[15:12]);
    ext_resp[0].inner_end   = CNT_W'(ext_req.instr[19:16]);
    ext_resp[1].recognized  = ext_req.instr[6:0] == 7'b0001011 || ext_req.instr[6:0] == 7'b0101011;
    ext_resp[1].outer_init  = '0;
    ext_resp[1].outer_end   = CNT_W'(ext_req.instr[15:12]);
    ext_resp[1].inner_end   = CNT_W'(3);
    ext_resp[1].next_outer  = ext_req.outer[0] && ext_req.inner == CNT_W'(1);
    ext_resp[1].branch      = ext_req.outer == CNT_W'(2) && ext_req.inner == CNT_W'(2) && !branched;
    ext_resp[1].branch_target = CNT_W'(1);
  end

  // ------------------------------------------------------------ expected sequences
  typedef struct { int o; int i; int e; } step_t;
  step_t exp_q [$];

  task automatic plan0(int o0, int o1, int n);
    if (n == 0) n = 1;
    for (int o = o0; o < o1; o++)
      for (int i = 0; i < n; i++) exp_q.push_back('{o, i, 0});
  endtask

  task automatic plan1(int o1);
    for (int o = 0; o < o1; o++) begin
      if (o % 2 == 1) begin
        exp_q.push_back('{o, 0, 1}); exp_q.push_back('{o, 1, 1});
      end else if (o == 2) begin
        exp_q.push_back('{o, 0, 1}); exp_q.push_back('{o, 1, 1}); exp_q.push_back('{o, 2, 1});
        exp_q.push_back('{o, 1, 1}); exp_q.push_back('{o, 2, 1});
      end else begin
        exp_q.push_back('{o, 0, 1}); exp_q.push_back('{o, 1, 1}); exp_q.push_back('{o, 2, 1});
      end
    end
  endtask

  task automatic chk(string what, bit ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // compare every accepted micro-op with the head of the expected queue
  int  seen;
  bit  check_on = 1'b1;
  logic [63:0] exp_rs1;
  always @(posedge clk) if (rst_n && check_on && uop_valid && uop_ready) begin
    step_t s;
    if (exp_q.size() == 0) chk("unexpected micro-op", 1'b0);
    else begin
      s = exp_q.pop_front();
      chk($sformatf("uop outer %0d/%0d inner %0d/%0d ext %0d/%0d", uop.elem, s.o, uop.xrd, s.i, uop.imm, s.e),
          int'(uop.elem) == s.o && int'(uop.xrd) == s.i && int'(uop.imm) == s.e);
      chk("uop.first", uop.first == (seen == 0));
      chk("uop.last", uop.last == (exp_q.size() == 0));
      chk("operand latched", cur_rs1 == exp_rs1 && cur_rs2 == exp_rs1 + 1);
    end
    seen++;
  end

  always_ff @(posedge clk) uop_ready <= ($urandom_range(0, 3) != 0);

  task automatic offer(logic [31:0] ins, logic [63:0] rs1);
    @(negedge clk);
    in_valid = 1'b1; in_instr = ins; in_rs1 = rs1;
    #1;
    while (!(in_ready || pass_valid || illegal)) begin @(negedge clk); #1; end
    @(negedge clk);
    in_valid = 1'b0; in_instr = 32'h0; in_rs1 = '0;
  endtask

  task automatic run(logic [31:0] ins);
    logic [63:0] r = {$urandom, $urandom};
    exp_rs1 = r;
    seen = 0;
    offer(ins, r);
    while (busy) @(posedge clk);
    chk("all micro-ops issued", exp_q.size() == 0);
    exp_q.delete();
  endtask

  int pass_cnt, ill_cnt, wait_cycles;
  always @(posedge clk) if (rst_n) begin
    if (pass_valid) pass_cnt++;
    if (illegal) ill_cnt++;
    if (in_valid && !in_ready && !busy) wait_cycles++;
  end

  initial begin
    in_valid = 0; in_instr = 0; in_rs1 = 0; terminate = 0; flush = 0; hazard = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);

    // extension 0: random ranges
    for (int t = 0; t < 20; t++) begin
      automatic int o0 = $urandom_range(0, 5), o1 = $urandom_range(0, 9), n = $urandom_range(0, 4);
      plan0(o0, o1, n);
      run({12'h0, 4'(n), 4'(o1), 4'(o0), 1'b0, 7'b0001011});
    end
    // extension 1: inner loop with early exit and a branch
    plan1(5);
    run({16'h0, 4'd5, 5'h0, 7'b0101011});

    // pass-through
    pass_cnt = 0;
    offer(32'h00B50533, 64'd0);
    chk("pass-through", pass_cnt == 1 && !busy);
    // illegal
    ill_cnt = 0;
    offer({11'h0, 1'b1, 4'd1, 4'd4, 4'd0, 1'b0, 7'b0001011}, 64'd0);
    chk("illegal pulse", ill_cnt == 1 && !busy);
    // hazard wait: held for 5 cycles, then released
    hazard = 1'b1;
    wait_cycles = 0;
    fork
      begin repeat (6) @(negedge clk); hazard = 1'b0; end
    join_none
    plan0(0, 2, 1);
    run({10'h0, 1'b1, 1'b0, 4'd1, 4'd2, 4'd0, 1'b0, 7'b0001011});
    chk("hazard wait held the instruction", wait_cycles >= 5);

    // terminate ends a long sequence
    check_on = 1'b0;
    @(negedge clk);
    in_valid = 1'b1; in_instr = {12'h0, 4'd2, 4'd15, 4'd0, 1'b0, 7'b0001011}; in_rs1 = '0;
    @(posedge clk); @(negedge clk); in_valid = 1'b0;
    chk("busy after accept", busy);
    repeat (4) @(posedge clk);
    @(negedge clk) terminate = 1'b1;
    #1;
    chk("no micro-op while terminating", !uop_valid);
    @(posedge clk); @(negedge clk) terminate = 1'b0;
    chk("terminate clears busy", !busy);
    exp_q.delete();

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
