// custom_alu: 64-bit integer ALU with the outputs vector arithmetic needs.
//
// A scalar-style ALU (add/sub, shifts, logic, compares, min/max) extended
// with: a carry-in; carry-out and signed-overflow outputs taken at the element
// width (SEW) for add-with-carry and saturating arithmetic; and the bits a
// right shift discards (shout) for fixed-point rounding. Operands arrive
// already sign- or zero-extended to 64 bits by the register file, so compares
// and right shifts work on the full 64 bits; only the shift amount, carry and
// overflow depend on SEW. Purely combinational.
//
// The list of extra outputs follows the document; the function encoding and
// the SEW-based carry position are this design's choices. Rotation (B
// extension only) is left out.
module custom_alu
  import lem_pkg::*;
(
  input  alu_fn_e         fn,
  input  sew_e            sew,
  input  logic [XLEN-1:0] in1,
  input  logic [XLEN-1:0] in2,
  input  logic            cin,
  output logic [XLEN-1:0] out,
  output logic            cmp_out,
  output logic            cout,     // carry (add) or no-borrow (sub) at SEW
  output logic            ovf,      // signed overflow at SEW
  output logic [XLEN-1:0] shout     // bits shifted out by a right shift
);

  logic            is_sub;
  logic [XLEN-1:0] b_eff, sum, ewmask;
  logic [XLEN:0]   sum_m;
  logic [5:0]      shamt;
  logic            lt, ltu, eq;

  always_comb begin
    ewmask = (sew == SEW64) ? '1 : ((XLEN'(1) << sew_bits(sew)) - 1'b1);
    is_sub = (fn == ALU_SUB);
    b_eff  = is_sub ? ~in2 : in2;
    // for SUB the carry-in is the inverse of the borrow-in
    sum    = in1 + b_eff + XLEN'(is_sub ? !cin : cin);
    sum_m  = {1'b0, in1 & ewmask} + {1'b0, b_eff & ewmask} + (XLEN+1)'(is_sub ? !cin : cin);
    cout   = sum_m[sew_bits(sew)];
    ovf    = (in1[sew_bits(sew)-1] == b_eff[sew_bits(sew)-1]) &&
             (sum[sew_bits(sew)-1] != in1[sew_bits(sew)-1]);

    shamt  = in2[5:0] & 6'(sew_bits(sew) - 1);
    shout  = in1 & ((XLEN'(1) << shamt) - 1'b1);

    eq  = (in1 == in2);
    lt  = $signed(in1) < $signed(in2);
    ltu = in1 < in2;

    cmp_out = 1'b0;
    out     = '0;
    unique case (fn)
      ALU_ADD, ALU_SUB: out = sum;
      ALU_SLL:  out = in1 << shamt;
      ALU_SRL:  out = in1 >> shamt;
      ALU_SRA:  out = XLEN'($signed(in1) >>> shamt);
      ALU_AND:  out = in1 & in2;
      ALU_OR:   out = in1 | in2;
      ALU_XOR:  out = in1 ^ in2;
      ALU_SEQ:  cmp_out = eq;
      ALU_SNE:  cmp_out = !eq;
      ALU_SLT:  cmp_out = lt;
      ALU_SLTU: cmp_out = ltu;
      ALU_SGE:  cmp_out = !lt;
      ALU_SGEU: cmp_out = !ltu;
      ALU_MIN:  out = lt  ? in1 : in2;
      ALU_MINU: out = ltu ? in1 : in2;
      ALU_MAX:  out = lt  ? in2 : in1;
      ALU_MAXU: out = ltu ? in2 : in1;
      ALU_PASS1: out = in1;
      ALU_PASS2: out = in2;
      default:  out = '0;
    endcase
    if (fn inside {ALU_SEQ, ALU_SNE, ALU_SLT, ALU_SLTU, ALU_SGE, ALU_SGEU})
      out = XLEN'(cmp_out);
  end

endmodule
