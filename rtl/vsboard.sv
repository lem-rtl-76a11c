// vsboard: scoreboard for vector register hazards.
//
// One counter per vector register holds how many issued micro-ops still have
// to write that register. A counter is incremented when such a micro-op is
// issued (leaves the register-read stage) and decremented when it writes back
// or when it is flushed from a stage before writing. The decoder presents a
// bitmap of every register the instruction will read or write; the prepare
// phase may proceed only when all counters under that bitmap are zero, which
// removes RAW and WAW hazards between instructions.
//
// The counter scheme follows the document. The counter width (CNT_W), the
// number of decrement ports and the same-cycle rule (a decrement and an
// increment of one register in one cycle cancel) are this design's choices.
// Interface: N_DEC decrement ports (valid + register), one increment port,
// check bitmap in, clear out (combinational from the counters).
module vsboard #(
  parameter int unsigned NREG  = 32,
  parameter int unsigned CNT_W = 4,
  parameter int unsigned N_DEC = 4
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     inc_valid,
  input  logic [$clog2(NREG)-1:0]  inc_reg,
  input  logic [N_DEC-1:0]         dec_valid,
  input  logic [$clog2(NREG)-1:0]  dec_reg [N_DEC],
  input  logic [NREG-1:0]          check,
  output logic                     clear,
  output logic [NREG-1:0]          pending
);

  logic [CNT_W-1:0] cnt_q [NREG];

  always_comb begin
    for (int unsigned r = 0; r < NREG; r++) pending[r] = (cnt_q[r] != '0);
    clear = ((pending & check) == '0);
  end

  localparam int unsigned RW = $clog2(NREG);

  logic [CNT_W-1:0] cnt_d [NREG];
  always_comb begin
    for (int unsigned r = 0; r < NREG; r++) begin
      cnt_d[r] = cnt_q[r];
      if (inc_valid && inc_reg == RW'(r)) cnt_d[r] = cnt_d[r] + 1'b1;
      for (int unsigned d = 0; d < N_DEC; d++)
        if (dec_valid[d] && dec_reg[d] == RW'(r)) cnt_d[r] = cnt_d[r] - 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned r = 0; r < NREG; r++) cnt_q[r] <= '0;
    end else begin
      for (int unsigned r = 0; r < NREG; r++) cnt_q[r] <= cnt_d[r];
    end
  end

  // counters never wrap
  for (genvar r = 0; r < NREG; r++) begin : g_chk
    assert property (@(posedge clk) disable iff (!rst_n)
      !(cnt_q[r] == '0 && !(inc_valid && inc_reg == RW'(r)) && |(dec_valid & onehot_hits(r))))
      else $error("scoreboard underflow on v%0d", r);
  end

  function automatic logic [N_DEC-1:0] onehot_hits(int unsigned r);
    logic [N_DEC-1:0] h;
    for (int unsigned d = 0; d < N_DEC; d++) h[d] = (dec_reg[d] == RW'(r));
    return h;
  endfunction

endmodule
