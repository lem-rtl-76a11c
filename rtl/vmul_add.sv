// vmul_add: pipelined integer multiplier with a third (addend) input.
//
// Computes, on 64-bit operands that the register file has already sign- or
// zero-extended from SEW: the low SEW bits of in1*in2 (MUL), the high SEW
// bits of the signed, unsigned or signed-by-unsigned product (MULH, MULHU,
// MULHSU), in1*in2 + in3 (MACC), in3 - in1*in2 (NMSAC) and the fixed-point
// signed multiply SMUL (vsmul): the 2*SEW-bit product shifted right by SEW-1,
// rounded by vxrm like the ALU's rounding shifts, and clipped to the signed SEW
// range (only (-2^(SEW-1))^2 clips; it raises sat). The result, the sat flag
// and a tag travel through LATENCY register stages, one new operation per
// cycle, no stall. The multiply-add shape (third port added after the product)
// and the fixed-point rounding in the multiplier's wrapper follow the
// document; the latency default and the encoding are this design's choices.
module vmul_add
  import lem_pkg::*;
#(
  parameter int unsigned LATENCY = 3,
  parameter int unsigned TAG_W   = RDTAG_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  mul_fn_e          fn,
  input  sew_e             sew,
  input  logic [1:0]       vxrm,
  input  logic [XLEN-1:0]  in1,
  input  logic [XLEN-1:0]  in2,
  input  logic [XLEN-1:0]  in3,
  input  logic [TAG_W-1:0] in_tag,
  output logic             out_valid,
  output logic [XLEN-1:0]  out,
  output logic [TAG_W-1:0] out_tag,
  output logic             out_sat
);

  logic signed [2*XLEN+1:0] prod;
  logic [XLEN-1:0]          res;
  logic signed [XLEN:0]     a_ext, b_ext;
  logic signed [2*XLEN+1:0] q, qmax;
  logic [2*XLEN+1:0]        rmask;
  logic                     rinc, sat;
  int unsigned              sh;

  always_comb begin
    // in1/in2 are extended to 64 bits already; the extra bit chooses how the
    // 64-bit value itself is read for the high-half products
    a_ext = (fn == MUL_MULHU) ? {1'b0, in1} : {in1[XLEN-1], in1};
    b_ext = (fn inside {MUL_MULHU, MUL_MULHSU}) ? {1'b0, in2} : {in2[XLEN-1], in2};
    prod  = a_ext * b_ext;
    // vsmul: shift by SEW-1 with rounding increment per vxrm, then clip
    sh    = sew_bits(sew) - 1;
    rmask = ((2*XLEN+2)'(1) << sh) - 1;
    unique case (vxrm)
      2'd0:    rinc = prod[sh-1];                                              // rnu
      2'd1:    rinc = prod[sh-1] && ((prod & (rmask >> 1)) != '0 || prod[sh]);  // rne
      2'd2:    rinc = 1'b0;                                                    // rdn
      default: rinc = !prod[sh] && (prod & rmask) != '0;                       // rod
    endcase
    q    = prod >>> sh;
    q    = q + $signed({{(2*XLEN+1){1'b0}}, rinc});
    qmax = $signed(((2*XLEN+2)'(1) << sh) - 1);
    sat  = (fn == MUL_SMUL) && (q > qmax);
    if (sat) q = qmax;
    unique case (fn)
      MUL_MULH, MUL_MULHU, MUL_MULHSU: res = XLEN'(prod >>> sew_bits(sew));
      MUL_MACC:  res = XLEN'(prod) + in3;
      MUL_NMSAC: res = in3 - XLEN'(prod);
      MUL_SMUL:  res = XLEN'(q);
      default:   res = XLEN'(prod);
    endcase
  end

  logic             v_q [LATENCY];
  logic [XLEN-1:0]  r_q [LATENCY];
  logic [TAG_W-1:0] t_q [LATENCY];
  logic             s_q [LATENCY];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < LATENCY; i++) begin
        v_q[i] <= 1'b0;
        r_q[i] <= '0;
        t_q[i] <= '0;
        s_q[i] <= 1'b0;
      end
    end else begin
      v_q[0] <= in_valid;
      r_q[0] <= res;
      t_q[0] <= in_tag;
      s_q[0] <= in_valid && sat;
      for (int i = 1; i < LATENCY; i++) begin
        v_q[i] <= v_q[i-1];
        r_q[i] <= r_q[i-1];
        t_q[i] <= t_q[i-1];
        s_q[i] <= s_q[i-1];
      end
    end
  end

  assign out_valid = v_q[LATENCY-1];
  assign out       = r_q[LATENCY-1];
  assign out_tag   = t_q[LATENCY-1];
  assign out_sat   = v_q[LATENCY-1] && s_q[LATENCY-1];

endmodule
