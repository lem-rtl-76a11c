// fp_reduce_queue: feedback queue from the FPU output to its input for
// floating-point reductions.
//
// The FPU is multi-cycle, so a reduction cannot keep its running value in an
// ALU accumulator. A result whose write-back request carries the reduce flag
// is pushed here instead of into the register file; the next reduction
// micro-op whose source request carries the reduce flag waits until the
// queue holds a value and takes it in place of that operand (pop).
// A plain FIFO of DEPTH entries; a push and a pop may happen in one cycle.
// The queue and its flags follow the document; the depth is this design's
// choice.
module fp_reduce_queue
  import lem_pkg::*;
#(
  parameter int unsigned DEPTH = 2
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            flush,
  input  logic            push,
  input  logic [XLEN-1:0] push_data,
  input  logic            pop,
  output logic            empty,
  output logic            full,
  output logic [XLEN-1:0] head
);

  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [XLEN-1:0] mem_q [DEPTH];
  logic [PW-1:0]   rd_q, wr_q;
  logic [PW:0]     cnt_q;

  assign empty = (cnt_q == '0);
  assign full  = (cnt_q == (PW+1)'(DEPTH));
  assign head  = mem_q[rd_q];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_q  <= '0;
      wr_q  <= '0;
      cnt_q <= '0;
      for (int i = 0; i < DEPTH; i++) mem_q[i] <= '0;
    end else if (flush) begin
      rd_q  <= '0;
      wr_q  <= '0;
      cnt_q <= '0;
    end else begin
      if (push) begin
        mem_q[wr_q] <= push_data;
        wr_q <= (wr_q == PW'(DEPTH - 1)) ? '0 : wr_q + 1'b1;
      end
      if (pop) rd_q <= (rd_q == PW'(DEPTH - 1)) ? '0 : rd_q + 1'b1;
      cnt_q <= cnt_q + (PW+1)'(push) - (PW+1)'(pop);
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) !(pop && empty))
    else $error("pop from empty reduction queue");
  assert property (@(posedge clk) disable iff (!rst_n) !(push && full && !pop))
    else $error("push to full reduction queue");

endmodule
