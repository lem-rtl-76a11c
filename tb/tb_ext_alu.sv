// tb_ext_alu: self-checking test of the extended ALU (and the custom ALU in it).
//
// Random operands at every element width are pushed through the element
// functions (add, sub, shifts, logic, compares, min/max), the saturating
// add/sub (unsigned and signed, with vxsat), the averaging add/sub and the
// rounding right shift under the four rounding modes, add-with-carry/borrow-out on the mask output, the
// operand exchange, the merge select by the control bit, an accumulator
// reduction and the LSB unit (population count with accumulation across words,
// find-first-set and set-before-first with the seen-1 flag), including a
// replay that restores the accumulator. Expected values are computed here from
// the operand values with plain SystemVerilog arithmetic.
module tb_ext_alu;
  import lem_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic            valid, ctrl_bit, replay, mask_out, vxsat;
  alu_ctrl_t       ctrl;
  sew_e            sew;
  logic [1:0]      vxrm;
  logic [XLEN-1:0] in1, in2, in3, out;

  ext_alu dut (.clk, .rst_n, .valid, .ctrl, .sew, .vxrm, .in1, .in2, .in3, .ctrl_bit, .replay,
               .out, .mask_out, .vxsat);

  task automatic chk(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h expected %h", what, got, exp); end
  endtask

  function automatic logic [63:0] em(sew_e s);
    return (s == SEW64) ? '1 : ((64'(1) << (8 << s)) - 1);
  endfunction
  function automatic logic [63:0] sx(logic [63:0] v, sew_e s);
    int w = 8 << s;
    return (w == 64) ? v : ((v & em(s)) | ({64{v[w-1]}} & ~em(s)));
  endfunction

  // one combinational evaluation (no state update unless upd)
  task automatic eval(alu_fn_e fn, logic [63:0] a, logic [63:0] b, logic upd = 1'b0);
    ctrl.fn = fn;
    in1 = a; in2 = b;
    valid = upd;
    #1;
  endtask

  task automatic step();
    valid = 1'b1;
    @(posedge clk); #1;
    valid = 1'b0;
  endtask

  longint signed sa, sb, smax, smin, sr;
  logic [63:0] ua, ub, e, r;
  int sh;

  initial begin
    valid = 0; ctrl = '0; sew = SEW64; vxrm = 0; in1 = 0; in2 = 0; in3 = 0; ctrl_bit = 1; replay = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    // element functions at every SEW
    for (int t = 0; t < 400; t++) begin
      automatic sew_e s = sew_e'($urandom_range(0, 3));
      automatic int w = 8 << s;
      sew  = s;
      ctrl = '0;
      ua = {$urandom, $urandom} & em(s); ub = {$urandom, $urandom} & em(s);
      if (t % 7 == 0) ub = ua;
      sa = longint'(sx(ua, s)); sb = longint'(sx(ub, s));
      eval(ALU_ADD, ua, ub);  chk("add", out & em(s), (ua + ub) & em(s));
      eval(ALU_SUB, ua, ub);  chk("sub", out & em(s), (ua - ub) & em(s));
      eval(ALU_AND, ua, ub);  chk("and", out & em(s), ua & ub);
      eval(ALU_OR,  ua, ub);  chk("or",  out & em(s), ua | ub);
      eval(ALU_XOR, ua, ub);  chk("xor", out & em(s), ua ^ ub);
      sh = int'(ub % 64'(w));
      eval(ALU_SLL, ua, ub);  chk("sll", out & em(s), (ua << sh) & em(s));
      eval(ALU_SRL, ua, ub);  chk("srl", out & em(s), (ua >> sh) & em(s));
      eval(ALU_SRA, sx(ua, s), ub);  chk("sra", out & em(s), 64'(sa >>> sh) & em(s));
      eval(ALU_SEQ, ua, ub);  chk("seq", 64'(mask_out), 64'(ua == ub));
      eval(ALU_SNE, ua, ub);  chk("sne", 64'(mask_out), 64'(ua != ub));
      eval(ALU_SLTU, ua, ub); chk("sltu", 64'(mask_out), 64'(ua < ub));
      eval(ALU_SLT, sx(ua, s), sx(ub, s)); chk("slt", 64'(mask_out), 64'(sa < sb));
      eval(ALU_MINU, ua, ub); chk("minu", out & em(s), (ua < ub) ? ua : ub);
      eval(ALU_MAX, sx(ua, s), sx(ub, s)); chk("max", out & em(s), 64'((sa > sb) ? sa : sb) & em(s));
      // exchange: sub with operands swapped
      ctrl.xchg = 1'b1;
      eval(ALU_SUB, ua, ub);  chk("sub xchg", out & em(s), (ub - ua) & em(s));
      ctrl.xchg = 1'b0;
      // saturating unsigned add / sub
      ctrl.fixp = FX_SAT_U;
      eval(ALU_ADD, ua, ub);
      e = (({1'b0, ua} + {1'b0, ub}) > {1'b0, em(s)}) ? em(s) : ua + ub;
      chk("saddu", out & em(s), e);
      chk("saddu vxsat", 64'(vxsat), 64'(0));   // valid is low: no flag
      valid = 1'b1; #1;
      chk("saddu vxsat valid", 64'(vxsat), 64'(({1'b0, ua} + {1'b0, ub}) > {1'b0, em(s)}));
      valid = 1'b0;
      eval(ALU_SUB, ua, ub);  chk("ssubu", out & em(s), (ua < ub) ? 64'd0 : ua - ub);
      // saturating signed add
      ctrl.fixp = FX_SAT_S;
      smax = (w == 64) ? 64'h7fffffffffffffff : (64'(1) << (w - 1)) - 1;
      smin = -smax - 1;
      eval(ALU_ADD, sx(ua, s), sx(ub, s));
      if (w == 64) begin
        sr = sa + sb;
        if (sa[63] == sb[63] && sr[63] != sa[63]) sr = sa[63] ? smin : smax;
      end else begin
        sr = sa + sb;
        if (sr > smax) sr = smax;
        if (sr < smin) sr = smin;
      end
      chk("sadd", out & em(s), 64'(sr) & em(s));
      // averaging add / subtract (vaaddu, vaadd, vasubu, vasub): exact sum or
      // difference in 66 bits, halved, rounded by vxrm (d = 1)
      for (int m = 0; m < 4; m++) begin
        automatic logic signed [65:0] t;
        automatic logic signed [65:0] hq;
        automatic logic ri;
        vxrm = 2'(m);
        for (int v = 0; v < 4; v++) begin
          ctrl.fixp = (v % 2 == 0) ? FX_AVG_U : FX_AVG_S;
          if (v % 2 == 0) begin
            eval(v < 2 ? ALU_ADD : ALU_SUB, ua, ub);
            t = (v < 2) ? 66'(ua) + 66'(ub) : 66'(ua) - 66'(ub);
          end else begin
            eval(v < 2 ? ALU_ADD : ALU_SUB, sx(ua, s), sx(ub, s));
            t = (v < 2) ? 66'(sa) + 66'(sb) : 66'(sa) - 66'(sb);
          end
          hq = t >>> 1;
          case (m)
            0: ri = t[0];
            1: ri = t[0] && hq[0];
            2: ri = 1'b0;
            default: ri = t[0] && !hq[0];
          endcase
          chk($sformatf("avg v=%0d vxrm=%0d", v, m), out & em(s), 64'(hq + 66'(ri)) & em(s));
        end
      end
      // rounding logical right shift (vssrl)
      ctrl.fixp = FX_ROUND;
      for (int m = 0; m < 4; m++) begin
        logic [63:0] q, rem, half;
        logic rb;
        vxrm = 2'(m);
        eval(ALU_SRL, ua, ub);
        q = ua >> sh;
        if (sh == 0) rb = 1'b0;
        else begin
          rem  = ua & ((64'(1) << sh) - 1);
          half = 64'(1) << (sh - 1);
          case (m)
            0: rb = rem >= half;
            1: rb = (rem > half) || (rem == half && q[0]);
            2: rb = 1'b0;
            default: rb = !q[0] && rem != 0;
          endcase
        end
        chk($sformatf("ssrl vxrm=%0d", m), out & em(s), (q + 64'(rb)) & em(s));
      end
      ctrl.fixp = FX_NONE;
      // add with carry in and carry out on the mask output
      ctrl.cin_ctrl = 1'b1; ctrl.mout_cout = 1'b1;
      ctrl_bit = $urandom_range(0, 1);
      eval(ALU_ADD, ua, ub);
      chk("adc", out & em(s), (ua + ub + 64'(ctrl_bit)) & em(s));
      chk("madc", 64'(mask_out), 64'(({1'b0, ua} + {1'b0, ub} + 65'(ctrl_bit)) > {1'b0, em(s)}));
      eval(ALU_SUB, ua, ub);
      chk("sbc", out & em(s), (ua - ub - 64'(ctrl_bit)) & em(s));
      chk("msbc", 64'(mask_out), 64'({1'b0, ua} < {1'b0, ub} + 65'(ctrl_bit)));
      // merge: the control bit chooses between the result and operand 1 / 2
      ctrl = '0; ctrl.sel_mode = 1'b1; ctrl.alt_in2 = 1'b1;
      ctrl_bit = $urandom_range(0, 1);
      eval(ALU_PASS1, ua, ub);
      chk("merge", out & em(s), ctrl_bit ? ua : ub);
      ctrl_bit = 1'b1;
    end

    // reduction: acc0 = x0; acc0 = acc0 + x_i
    sew = SEW64; ctrl = '0; ctrl.save_acc = 1'b1;
    ua = {$urandom, $urandom}; e = ua;
    in1 = ua; in2 = 0; ctrl.fn = ALU_ADD; step();
    ctrl.use_acc = 1'b1;
    for (int i = 0; i < 6; i++) begin
      ub = {$urandom, $urandom}; e += ub;
      in1 = 0; in2 = ub; step();
    end
    in2 = 0; #1;
    chk("accumulated sum", out, e);
    // replay undoes the last update
    in2 = 64'd5; step();
    replay = 1'b1; @(posedge clk); #1 replay = 1'b0;
    in2 = 0; #1;
    chk("replay restores accumulator", out, e);

    // population count over three words
    ctrl = '0; ctrl.osel = XO_POPC; ctrl.save_acc = 1'b1; ctrl.first = 1'b1;
    e = 0;
    for (int i = 0; i < 3; i++) begin
      ua = {$urandom, $urandom}; ub = {$urandom, $urandom};
      e += 64'($countones(ua & ub));
      in2 = ua; in3 = ub; step();
      ctrl.first = 1'b0;
    end
    #1 chk("popc accumulated", dut.acc_q[0], e);

    // find first set across words: word 0 empty, word 1 has bits
    ctrl = '0; ctrl.osel = XO_FIRST; ctrl.save_acc = 1'b1; ctrl.first = 1'b1;
    in1 = 64'd0; in2 = 64'h0; in3 = '1; #1;
    chk("first: empty word gives -1", out, '1);
    step();
    ctrl.first = 1'b0;
    in1 = 64'd64; in2 = 64'h0000_0100_0000_1000; #1;
    chk("first: index in word 1", out, 64'd76);
    step();
    in1 = 64'd128; in2 = 64'h1; #1;
    chk("first: later word keeps found index", out, 64'd76);
    // set-before-first
    ctrl = '0; ctrl.osel = XO_SBF; ctrl.first = 1'b1;
    in2 = 64'h0; in3 = '1; #1;
    chk("sbf empty word", out, '1);
    step();
    ctrl.first = 1'b0;
    in2 = 64'h0000_0000_0000_0050; #1;
    chk("sbf found", out, 64'h0000_0000_0000_000F);
    step();
    in2 = 64'h1; #1;
    chk("sbf after found", out, 64'h0);

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
