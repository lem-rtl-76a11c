// lem_expander: the LEM loop-expanding microsequencer.
//
// The expander turns one instruction into a sequence of micro-ops. It holds
// two counters and a busy flag. While idle it offers each incoming
// instruction to all N_EXT decoder extensions (the "prepare phase"). If none
// recognises it, the instruction is passed downstream unchanged. If one does,
// the expander takes the instruction, blocks the front end, loads the outer
// counter with the extension's initial value and clears the inner counter,
// and raises busy. While busy, the counters are shown to the active extension,
// which answers with the micro-op for those counter values. Each accepted
// micro-op advances the counters: the inner counter (a micro-pc) counts up to
// the extension's inner limit or follows the extension's branch, and at the
// end of an inner loop the outer counter (the element index) steps until it
// reaches the outer limit. A terminate input (fault-only-first loads) or a
// flush ends the sequence at once.
//
// The counter scheme and the prepare phase follow the description of the
// expander. The branch/next_outer response fields, the priority of lower
// numbered extensions, the illegal-instruction pulse and the absence of a
// prepare micro-op on the output are this design's choices.
//
// Timing: the prepare phase takes one cycle (in_valid && in_ready); the first
// micro-op is offered in the next cycle; then one micro-op per cycle while
// uop_ready is high. An instruction whose outer range is empty produces no
// micro-op.
module lem_expander
  import lem_pkg::*;
  import lem_ext_pkg::*;
#(
  parameter int unsigned N_EXT = 2
) (
  input  logic              clk,
  input  logic              rst_n,
  // from the front end
  input  logic              in_valid,
  input  logic [31:0]       in_instr,
  input  logic [XLEN-1:0]   in_rs1,
  input  logic [XLEN-1:0]   in_rs2,
  input  logic [XLEN-1:0]   in_frs1,
  output logic              in_ready,
  // unrecognised instructions pass through unchanged
  output logic              pass_valid,
  output logic [31:0]       pass_instr,
  output logic              illegal,
  // decoder extensions
  output ext_req_t          ext_req,
  input  ext_resp_t         ext_resp [N_EXT],
  // micro-op output
  output logic              uop_valid,
  output uop_t              uop,
  input  logic              uop_ready,
  // operands of the instruction being expanded
  output logic [31:0]       cur_instr,
  output logic [XLEN-1:0]   cur_rs1,
  output logic [XLEN-1:0]   cur_rs2,
  output logic [XLEN-1:0]   cur_frs1,
  // control
  input  logic              terminate,
  input  logic              flush,
  output logic              busy
);

  localparam int unsigned EXT_W = (N_EXT > 1) ? $clog2(N_EXT) : 1;

  logic [CNT_W-1:0] outer_q, inner_q, outer_end_q, inner_end_q;
  logic [EXT_W-1:0] active_q;
  logic             first_q;
  logic [31:0]      instr_q;
  logic [XLEN-1:0]  rs1_q, rs2_q, frs1_q;

  // which extension recognises the offered instruction (lowest index wins)
  logic             hit;
  logic [EXT_W-1:0] hit_id;
  always_comb begin
    hit    = 1'b0;
    hit_id = '0;
    for (int unsigned i = 0; i < N_EXT; i++) begin
      if (!hit && ext_resp[i].recognized) begin
        hit    = 1'b1;
        hit_id = EXT_W'(i);
      end
    end
  end

  assign ext_req.instr   = busy ? instr_q : in_instr;
  assign ext_req.prepare = !busy && in_valid;
  assign ext_req.busy    = busy;
  assign ext_req.outer   = outer_q;
  assign ext_req.inner   = inner_q;

  ext_resp_t act;
  assign act = ext_resp[active_q];

  logic hit_illegal, hit_wait;
  assign hit_illegal = hit && ext_resp[hit_id].illegal;
  assign hit_wait    = hit && ext_resp[hit_id].wait_hazard;

  assign in_ready   = !busy && !(hit && !hit_illegal && hit_wait) && !flush;
  assign pass_valid = !busy && in_valid && !hit && !flush;
  assign pass_instr = in_instr;
  assign illegal    = !busy && in_valid && hit_illegal && !flush;

  logic accept;
  assign accept = !busy && in_valid && hit && !hit_illegal && !hit_wait && !flush;

  // counter stepping
  logic [CNT_W-1:0] inner_inc, outer_inc;
  logic             end_inner, finish;
  assign inner_inc = inner_q + 1'b1;
  assign outer_inc = outer_q + 1'b1;
  assign end_inner = !act.branch && (act.next_outer || (inner_inc >= inner_end_q));
  assign finish    = end_inner && (outer_inc >= outer_end_q);

  assign uop_valid = busy && !terminate && !flush;
  always_comb begin
    uop       = act.uop;
    uop.valid = act.uop.valid && uop_valid;
    uop.first = first_q;
    uop.last  = finish;
  end

  logic fire;
  assign fire = uop_valid && uop_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy        <= 1'b0;
      outer_q     <= '0;
      inner_q     <= '0;
      outer_end_q <= '0;
      inner_end_q <= '0;
      active_q    <= '0;
      first_q     <= 1'b0;
      instr_q     <= '0;
      rs1_q       <= '0;
      rs2_q       <= '0;
      frs1_q      <= '0;
    end else if (flush || (busy && terminate)) begin
      busy <= 1'b0;
    end else if (accept) begin
      active_q    <= hit_id;
      instr_q     <= in_instr;
      rs1_q       <= in_rs1;
      rs2_q       <= in_rs2;
      frs1_q      <= in_frs1;
      outer_q     <= ext_resp[hit_id].outer_init;
      inner_q     <= '0;
      outer_end_q <= ext_resp[hit_id].outer_end;
      inner_end_q <= (ext_resp[hit_id].inner_end == '0) ? CNT_W'(1) : ext_resp[hit_id].inner_end;
      first_q     <= 1'b1;
      busy        <= ext_resp[hit_id].outer_init < ext_resp[hit_id].outer_end;
    end else if (fire) begin
      first_q <= 1'b0;
      if (act.branch) begin
        inner_q <= act.branch_target;
      end else if (end_inner) begin
        inner_q <= '0;
        outer_q <= outer_inc;
        if (finish) busy <= 1'b0;
      end else begin
        inner_q <= inner_inc;
      end
    end
  end

  assign cur_instr = instr_q;
  assign cur_rs1   = rs1_q;
  assign cur_rs2   = rs2_q;
  assign cur_frs1  = frs1_q;

  // a micro-op offered must stay while it is not accepted
  property p_uop_stable;
    @(posedge clk) disable iff (!rst_n)
      (uop_valid && !uop_ready && !terminate && !flush) |=> (outer_q == $past(outer_q) && inner_q == $past(inner_q));
  endproperty
  assert property (p_uop_stable);

endmodule
