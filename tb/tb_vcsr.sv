// tb_vcsr: self-checking test of the vector CSR block.
//
// Applies random vset requests (AVL from rs1, from the immediate, the maximum,
// or keep vl; vtype from the instruction or from rs2, including reserved
// encodings) and checks vl = min(AVL, VLMAX) with VLMAX = VLEN/SEW*LMUL, and
// vill with vl = 0 for reserved vtype values. Then checks the two kinds of
// load fault: fault-only-first at element > 0 trims vl and terminates without
// a trap; any other fault traps and stores the element in vstart, which the
// end of the next instruction clears. vxsat is sticky; vxrm and vstart are
// writable.
module tb_vcsr;
  import lem_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic             vset_valid, fault_valid, fault_ff, terminate, trap, instr_done, vxsat_set;
  logic             vstart_we, vxrm_we, vxsat;
  vset_ctrl_t       vset;
  logic [XLEN-1:0]  rs1_val, rs2_val, vset_new_vl;
  logic [CNT_W-1:0] fault_elem;
  logic [VL_W-1:0]  vstart_wdata;
  logic [1:0]       vxrm_wdata;
  vcsr_t            csr;

  vcsr dut (.clk, .rst_n, .vset_valid, .vset, .rs1_val, .rs2_val, .vset_new_vl, .fault_valid, .fault_ff,
            .fault_elem, .terminate, .trap, .instr_done, .vxsat_set, .vstart_we, .vstart_wdata,
            .vxrm_we, .vxrm_wdata, .csr, .vxsat);

  task automatic chk(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h expected %h", what, got, exp); end
  endtask

  function automatic int vlmax(int sew, int lmul);
    int v = 256 >> (sew + 3);
    case (lmul)
      1: return v * 2;
      2: return v * 4;
      3: return v * 8;
      5: return v / 8;
      6: return v / 4;
      7: return v / 2;
      default: return v;
    endcase
  endfunction

  task automatic clk1();
    @(posedge clk); #1;
    vset_valid = 0; fault_valid = 0; instr_done = 0; vxsat_set = 0; vstart_we = 0; vxrm_we = 0;
  endtask

  int vl_exp;
  initial begin
    vset_valid = 0; vset = '0; rs1_val = 0; rs2_val = 0; fault_valid = 0; fault_ff = 0; fault_elem = 0;
    instr_done = 0; vxsat_set = 0; vstart_we = 0; vstart_wdata = 0; vxrm_we = 0; vxrm_wdata = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    #1 chk("vill after reset", 64'(csr.vtype.vill), 1);
    vl_exp = 0;
    for (int t = 0; t < 600; t++) begin
      automatic int sew = $urandom_range(0, 4), lmul = $urandom_range(0, 7), avl, vm;
      logic bad, from_rs2;
      vtype_t vt;
      vt = '0; vt.vsew = 3'(sew); vt.vlmul = 3'(lmul); vt.vta = $urandom; vt.vma = $urandom;
      from_rs2 = $urandom_range(0, 1);
      vset = '0;
      vset.avl = avl_e'($urandom_range(0, 3));
      vset.uimm = 5'($urandom);
      rs1_val = ($urandom_range(0, 3) == 0) ? {$urandom, $urandom} : 64'($urandom_range(0, 80));
      vset.vtype_from_rs2 = from_rs2;
      if (from_rs2) rs2_val = 64'(vt);
      else vset.vtype = vt;
      if (from_rs2 && t % 11 == 0) rs2_val[40] = 1'b1;       // reserved upper bits
      bad = sew > 3 || lmul == 4 || (from_rs2 && t % 11 == 0);
      vm  = bad ? 0 : vlmax(sew, lmul);
      case (vset.avl)
        AVL_RS1:  avl = (rs1_val > 64'(vm)) ? vm : int'(rs1_val);
        AVL_UIMM: avl = (int'(vset.uimm) > vm) ? vm : int'(vset.uimm);
        AVL_MAX:  avl = vm;
        default:  avl = (vl_exp > vm) ? vm : vl_exp;
      endcase
      if (bad) avl = 0;
      vset_valid = 1'b1;
      #1 chk("new vl", vset_new_vl, 64'(avl));
      clk1();
      vl_exp = avl;
      chk("vl", 64'(csr.vl), 64'(avl));
      chk("vill", 64'(csr.vtype.vill), 64'(bad));
      if (!bad) chk("vtype", 64'(csr.vtype), 64'(vt));
    end

    // fault-only-first: fault at element 3 of vl = 8
    vset = '0; vset.avl = AVL_RS1; vset.vtype.vsew = 3'd3; rs1_val = 8; vset_valid = 1; clk1();
    fault_valid = 1; fault_ff = 1; fault_elem = 3;
    #1 chk("ff terminates", 64'(terminate), 1);
    chk("ff does not trap", 64'(trap), 0);
    clk1();
    chk("ff trims vl", 64'(csr.vl), 3);
    // fault-only-first at element 0 traps
    fault_valid = 1; fault_ff = 1; fault_elem = 0;
    #1 chk("ff element 0 traps", 64'(trap), 1);
    clk1();
    // ordinary fault at element 2: trap, vstart = 2, vl kept
    fault_valid = 1; fault_ff = 0; fault_elem = 2;
    #1 chk("fault traps", 64'(trap), 1);
    clk1();
    chk("vstart set", 64'(csr.vstart), 2);
    chk("vl kept", 64'(csr.vl), 3);
    instr_done = 1; clk1();
    chk("vstart cleared", 64'(csr.vstart), 0);
    vstart_we = 1; vstart_wdata = 5; clk1();
    chk("vstart write", 64'(csr.vstart), 5);
    vxrm_we = 1; vxrm_wdata = 2; clk1();
    chk("vxrm write", 64'(csr.vxrm), 2);
    chk("vxsat clear", 64'(vxsat), 0);
    vxsat_set = 1; clk1(); clk1();
    chk("vxsat sticky", 64'(vxsat), 1);
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
