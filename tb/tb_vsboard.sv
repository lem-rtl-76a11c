// tb_vsboard: self-checking test of the vector register scoreboard.
//
// Random increments (issue of a write to a register) and decrements on the
// decrement ports (write-backs), never more decrements than outstanding
// writes, are applied while a reference array of counts is kept here. Each
// cycle the pending bitmap and the clear output for a random check bitmap are
// compared with the reference.
module tb_vsboard;

  localparam int unsigned NREG = 32, CW = 4, ND = 3;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic            inc_valid, clear;
  logic [4:0]      inc_reg;
  logic [ND-1:0]   dec_valid;
  logic [4:0]      dec_reg [ND];
  logic [NREG-1:0] check, pending;

  vsboard #(.NREG(NREG), .CNT_W(CW), .N_DEC(ND)) dut (.clk, .rst_n, .inc_valid, .inc_reg, .dec_valid,
                                                      .dec_reg, .check, .clear, .pending);

  int cnt [NREG];
  int n_block, n_clear;

  task automatic chk(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h expected %h", what, got, exp); end
  endtask

  initial begin
    inc_valid = 0; inc_reg = 0; dec_valid = 0; check = 0; n_block = 0; n_clear = 0;
    for (int d = 0; d < ND; d++) dec_reg[d] = 0;
    for (int r = 0; r < NREG; r++) cnt[r] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 4000; t++) begin
      int tmp [NREG];
      logic [NREG-1:0] ep;
      @(negedge clk);
      // registers 0..7 only, so counts build up
      inc_valid = $urandom_range(0, 1);
      inc_reg   = 5'($urandom_range(0, 7));
      if (cnt[inc_reg] >= (1 << CW) - 2) inc_valid = 1'b0;
      tmp = cnt;
      for (int d = 0; d < ND; d++) begin
        dec_reg[d]   = 5'($urandom_range(0, 7));
        dec_valid[d] = ($urandom_range(0, 2) == 0) && tmp[dec_reg[d]] > 0;
        if (dec_valid[d]) tmp[dec_reg[d]]--;
      end
      check = {$urandom} & 32'h0000_00FF;
      ep = '0;
      for (int r = 0; r < NREG; r++) ep[r] = cnt[r] != 0;
      #1;
      chk("pending", 64'(pending), 64'(ep));
      chk("clear", 64'(clear), 64'((ep & check) == 0));
      if (clear) n_clear++; else n_block++;
      @(posedge clk);
      cnt = tmp;
      if (inc_valid) cnt[inc_reg]++;
    end
    chk("hazard blocked sometimes", 64'(n_block > 0), 1);
    chk("hazard clear sometimes", 64'(n_clear > 0), 1);
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
