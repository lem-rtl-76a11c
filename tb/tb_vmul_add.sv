// tb_vmul_add: self-checking test of the pipelined multiply-add unit.
//
// Issues a random operation (MUL, MULH, MULHU, MULHSU, MACC, NMSAC, SMUL) at a
// random element width and rounding mode in most cycles, with operands sign- or
// zero-extended the way the register file delivers them; SMUL operands are
// often the most negative value so that saturation happens. For SMUL the
// rounding is worked out from the floor quotient and remainder of the exact
// product, and the saturation flag is checked as well. The expected result is computed
// here with wide signed arithmetic and queued with the issue cycle; each
// result must come out exactly LATENCY cycles later with its tag, and no
// result may appear when nothing was issued.
module tb_vmul_add;
  import lem_pkg::*;

  localparam int unsigned LAT = 3;
  localparam int unsigned TW  = 12;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic            in_valid, out_valid, out_sat;
  logic [1:0]      vxrm;
  mul_fn_e         fn;
  sew_e            sew;
  logic [XLEN-1:0] in1, in2, in3, out;
  logic [TW-1:0]   in_tag, out_tag;

  vmul_add #(.LATENCY(LAT), .TAG_W(TW)) dut (.clk, .rst_n, .in_valid, .fn, .sew, .in1, .in2, .in3,
                                             .vxrm, .in_tag, .out_valid, .out, .out_tag, .out_sat);

  typedef struct { logic [63:0] r; logic [TW-1:0] tag; int due; sew_e s; logic sat; } exp_t;
  exp_t q [$];

  function automatic logic [63:0] em(sew_e s);
    return (s == SEW64) ? '1 : ((64'(1) << (8 << s)) - 1);
  endfunction
  function automatic logic [63:0] sx(logic [63:0] v, sew_e s);
    int w = 8 << s;
    return (w == 64) ? v : ((v & em(s)) | ({64{v[w-1]}} & ~em(s)));
  endfunction

  task automatic chk(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h expected %h", what, got, exp); end
  endtask

  // drive on the falling edge, model on the rising edge
  always @(negedge clk) if (rst_n) begin
    logic [63:0] a, b, c;
    logic signed [129:0] pa, pb, p;
    logic [63:0] r;
    logic signed [129:0] fq, rem, half, lim;
    logic inc, sat;
    int w;
    in_valid = ($urandom_range(0, 4) != 0);
    fn  = mul_fn_e'($urandom_range(0, 6));
    vxrm = 2'($urandom);
    sew = sew_e'($urandom_range(0, 3));
    w   = 8 << sew;
    a = {$urandom, $urandom} & em(sew);
    b = {$urandom, $urandom} & em(sew);
    c = {$urandom, $urandom};
    if (fn == MUL_SMUL && $urandom_range(0, 3) == 0) a = 64'(1) << (w - 1);
    if (fn == MUL_SMUL && $urandom_range(0, 3) == 0) b = 64'(1) << (w - 1);
    // extension as delivered by the register file
    if (fn != MUL_MULHU) a = sx(a, sew);
    if (!(fn inside {MUL_MULHU, MUL_MULHSU})) b = sx(b, sew);
    in1 = a; in2 = b; in3 = c; in_tag = TW'($urandom);
    pa = (fn == MUL_MULHU) ? 130'(a) : 130'($signed(a));
    pb = (fn inside {MUL_MULHU, MUL_MULHSU}) ? 130'(b) : 130'($signed(b));
    p  = pa * pb;
    // SMUL reference: floor quotient by 2^(w-1), remainder, rounding, clip
    fq   = p >>> (w - 1);
    rem  = p - (fq <<< (w - 1));
    half = 130'(1) <<< (w - 2);
    case (vxrm)
      2'd0: inc = rem >= half;
      2'd1: inc = rem > half || (rem == half && fq[0]);
      2'd2: inc = 1'b0;
      default: inc = !fq[0] && rem != 0;
    endcase
    fq  = fq + 130'(inc);
    lim = (130'(1) <<< (w - 1)) - 1;
    sat = fn == MUL_SMUL && fq > lim;
    if (sat) fq = lim;
    case (fn)
      MUL_MULH, MUL_MULHU, MUL_MULHSU: r = 64'(p >>> w);
      MUL_MACC:  r = 64'(p) + c;
      MUL_NMSAC: r = c - 64'(p);
      MUL_SMUL:  r = 64'(fq);
      default:   r = 64'(p);
    endcase
    if (in_valid) q.push_back('{r & em(sew), in_tag, cyc + LAT, sew, sat});
  end

  int n_out, n_sat;
  always @(posedge clk) if (rst_n) begin
    exp_t e;
    if (out_valid) begin
      n_out++;
      if (q.size() == 0) chk("result without operation", 1, 0);
      else begin
        e = q.pop_front();
        chk("result", out & em(e.s), e.r);
        chk("tag", 64'(out_tag), 64'(e.tag));
        chk("latency", 64'(cyc), 64'(e.due));
        chk("saturation flag", 64'(out_sat), 64'(e.sat));
        if (e.sat) n_sat++;
      end
    end
  end

  initial begin
    in_valid = 0; fn = MUL_MUL; sew = SEW64; in1 = 0; in2 = 0; in3 = 0; in_tag = 0; n_out = 0; n_sat = 0; vxrm = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    repeat (2000) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b0;   // stop issuing; let nothing more arrive
    chk("results seen", 64'(n_out > 1000), 1);
    chk("saturations seen", 64'(n_sat > 5), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
