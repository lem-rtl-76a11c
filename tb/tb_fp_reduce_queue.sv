// tb_fp_reduce_queue: self-checking test of the FP reduction feedback queue.
//
// Pushes and pops at random, never pushing into a full queue or popping an
// empty one, and compares the head, empty and full with a SystemVerilog queue
// used as the reference. Pushing and popping in one cycle, filling to DEPTH
// and a flush in the middle of the run are all exercised.
module tb_fp_reduce_queue;
  import lem_pkg::*;

  localparam int unsigned DEPTH = 2;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic            flush, push, pop, empty, full;
  logic [XLEN-1:0] push_data, head;

  fp_reduce_queue #(.DEPTH(DEPTH)) dut (.clk, .rst_n, .flush, .push, .push_data, .pop, .empty, .full, .head);

  logic [63:0] ref_q [$];
  int n_full, n_both;

  task automatic chk(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h expected %h", what, got, exp); end
  endtask

  initial begin
    flush = 0; push = 0; pop = 0; push_data = 0; n_full = 0; n_both = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      chk("empty", 64'(empty), 64'(ref_q.size() == 0));
      chk("full", 64'(full), 64'(ref_q.size() == DEPTH));
      if (ref_q.size() > 0) chk("head", head, ref_q[0]);
      if (full) n_full++;
      flush = (t == 1500);
      pop   = !empty && ($urandom_range(0, 2) == 0);
      push  = (!full || pop) && ($urandom_range(0, 1) == 0);
      push_data = {$urandom, $urandom};
      if (push && pop) n_both++;
      @(posedge clk);
      if (flush) ref_q.delete();
      else begin
        if (pop) void'(ref_q.pop_front());
        if (push) ref_q.push_back(push_data);
      end
    end
    chk("queue filled up", 64'(n_full > 0), 1);
    chk("push and pop together", 64'(n_both > 0), 1);
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
