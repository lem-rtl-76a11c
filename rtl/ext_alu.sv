// ext_alu: the extended integer ALU of the vector lane.
//
// Wraps custom_alu with the logic vector instructions need:
//  * operand exchange (XCHG), inversion of operand 2 after the exchange, and a
//    left shift of operand 2 by 0..3 bits for address generation;
//  * accumulator registers: use_acc replaces operand 1 by an accumulator,
//    save_acc stores the result into it (reductions, strided addresses);
//  * fixed-point saturation of add/sub, rounding of right shifts and the
//    averaging add/sub (a +/- b, one more bit, halved and rounded; vxrm);
//  * the "LSB related" unit on in2 & in3 (in3 is the bit mask): population
//    count, find-first-set and set-before/including/only-first, with a seen-1
//    flag that carries the state across 64-bit words;
//  * a final output mux controlled by the control bit, which also serves as
//    the mask of the result (merge, masked-off reduction elements);
//  * a mask output: compare result, or carry/borrow out.
// Accumulators and the seen-1 flag keep their value before the last update,
// so a replay restores them.
//
// Structure follows the ALU block diagram of the document (XCHG, 0-3 shifter,
// accumulators, control-bit select, priority encoder with seen-1 flag). The
// exact fixed-point and find-first conventions are the RISC-V V rules; how
// they are mapped onto this datapath is this design's choice.
// Timing: combinational result; accumulators and seen-1 update on the clock
// edge when valid is high.
module ext_alu
  import lem_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            valid,
  input  alu_ctrl_t       ctrl,
  input  sew_e            sew,
  input  logic [1:0]      vxrm,
  input  logic [XLEN-1:0] in1,
  input  logic [XLEN-1:0] in2,
  input  logic [XLEN-1:0] in3,
  input  logic            ctrl_bit,
  input  logic            replay,
  output logic [XLEN-1:0] out,
  output logic            mask_out,
  output logic            vxsat
);

  logic [XLEN-1:0] acc_q   [N_ACC];
  logic [XLEN-1:0] acc_bak [N_ACC];
  logic            seen_q, seen_bak;

  logic [XLEN-1:0] a, b, b_raw, ewmask, r_alu, r_main, r_fx, x;
  logic            cmp, cout, ovf, seen_eff, nz, sat, rinc;
  logic [XLEN-1:0] shout, popc, ctz, below, lowbit;
  logic [5:0]      shamt;
  logic [XLEN:0]   avg;

  custom_alu u_alu (
    .fn(ctrl.fn), .sew(sew), .in1(a), .in2(b),
    .cin(ctrl.cin_ctrl ? ctrl_bit : 1'b0),
    .out(r_alu), .cmp_out(cmp), .cout(cout), .ovf(ovf), .shout(shout)
  );

  always_comb begin
    ewmask = (sew == SEW64) ? '1 : ((XLEN'(1) << sew_bits(sew)) - 1'b1);
    // exchange, accumulator, invert, pre-shift
    a     = ctrl.xchg ? in2 : in1;
    b_raw = ctrl.xchg ? in1 : in2;
    if (ctrl.use_acc) a = acc_q[ctrl.acc_idx];
    b = ctrl.inv2 ? ~b_raw : b_raw;
    b = b << ctrl.sh2;

    // fixed point
    sat  = 1'b0;
    r_fx = r_alu;
    shamt = b[5:0] & 6'(sew_bits(sew) - 1);
    rinc = 1'b0;
    avg  = '0;
    unique case (ctrl.fixp)
      FX_SAT_U: begin
        if (ctrl.fn == ALU_SUB && !cout) begin sat = 1'b1; r_fx = '0; end
        if (ctrl.fn == ALU_ADD &&  cout) begin sat = 1'b1; r_fx = '1; end
      end
      FX_SAT_S: if (ovf) begin
        sat  = 1'b1;
        // result saturates toward the sign of operand 1
        r_fx = a[sew_bits(sew)-1] ? ~(ewmask >> 1) : (ewmask >> 1);
      end
      FX_ROUND: begin
        if (shamt != 0) begin
          unique case (vxrm)
            2'd0: rinc = shout[shamt-1];                                   // rnu
            2'd1: rinc = shout[shamt-1] &&
                         (((shout & ((XLEN'(1) << (shamt-1)) - 1)) != 0) || r_alu[0]); // rne
            2'd2: rinc = 1'b0;                                             // rdn
            default: rinc = !r_alu[0] && (shout != 0);                      // rod
          endcase
        end
        r_fx = (vxrm == 2'd3) ? (r_alu | XLEN'(rinc)) : (r_alu + XLEN'(rinc));
      end
      FX_AVG_U, FX_AVG_S: begin
        // operands are already extended to 64 bits; one more bit keeps SEW=64 exact
        avg = (ctrl.fn == ALU_SUB)
            ? {ctrl.fixp == FX_AVG_S && a[XLEN-1], a} - {ctrl.fixp == FX_AVG_S && b_raw[XLEN-1], b_raw}
            : {ctrl.fixp == FX_AVG_S && a[XLEN-1], a} + {ctrl.fixp == FX_AVG_S && b_raw[XLEN-1], b_raw};
        unique case (vxrm)
          2'd0:    rinc = avg[0];              // rnu
          2'd1:    rinc = avg[0] && avg[1];    // rne
          2'd2:    rinc = 1'b0;                // rdn
          default: rinc = avg[0] && !avg[1];   // rod
        endcase
        r_fx = avg[XLEN:1] + XLEN'(rinc);
      end
      default: ;
    endcase

    // LSB related unit
    x        = in2 & in3;
    nz       = (x != '0);
    seen_eff = ctrl.first ? 1'b0 : seen_q;
    popc     = '0;
    for (int i = 0; i < XLEN; i++) popc = popc + XLEN'(x[i]);
    ctz = '0;
    for (int i = XLEN - 1; i >= 0; i--) if (x[i]) ctz = XLEN'(i);
    lowbit = x & (~x + 1'b1);
    below  = lowbit - 1'b1;

    unique case (ctrl.osel)
      XO_POPC:  r_main = (ctrl.first ? '0 : acc_q[ctrl.acc_idx]) + popc;
      XO_FIRST: r_main = (!seen_eff && nz) ? (in1 + ctz)
                        : (ctrl.first ? '1 : acc_q[ctrl.acc_idx]);
      XO_SBF:   r_main = seen_eff ? '0 : (nz ? below : '1);
      XO_SIF:   r_main = seen_eff ? '0 : (nz ? (below | lowbit) : '1);
      XO_SOF:   r_main = seen_eff ? '0 : lowbit;
      default:  r_main = r_fx;
    endcase
    if (ctrl.invout) r_main = ~r_main;

    out      = (ctrl.sel_mode && !ctrl_bit) ? (ctrl.alt_in2 ? b_raw : a) : r_main;
    mask_out = ctrl.mout_cout ? ((ctrl.fn == ALU_SUB) ? !cout : cout) : cmp;
    if (ctrl.invout && !ctrl.mout_cout && ctrl.osel == XO_ALU) mask_out = !mask_out;
    vxsat    = valid && sat && !(ctrl.sel_mode && !ctrl_bit);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N_ACC; i++) begin
        acc_q[i]   <= '0;
        acc_bak[i] <= '0;
      end
      seen_q   <= 1'b0;
      seen_bak <= 1'b0;
    end else if (replay) begin
      for (int i = 0; i < N_ACC; i++) acc_q[i] <= acc_bak[i];
      seen_q <= seen_bak;
    end else if (valid) begin
      if (ctrl.save_acc) begin
        acc_bak[ctrl.acc_idx] <= acc_q[ctrl.acc_idx];
        acc_q[ctrl.acc_idx]   <= out;
      end
      if (ctrl.osel inside {XO_FIRST, XO_SBF, XO_SIF, XO_SOF}) begin
        seen_bak <= seen_q;
        seen_q   <= seen_eff || nz;
      end
    end
  end

endmodule
