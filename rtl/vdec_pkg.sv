// vdec_pkg: the interface between the vector common decode logic and its
// decode submodules (memory, integer, FP, permutation, vsetvl).
//
// It extends the expander's extension response with what the common logic
// needs for its checks: which vector operands the instruction reads and
// writes, the size of each register group, whether the destination may not
// overlap a source, and whether the destination is a mask register.
package vdec_pkg;
  import lem_pkg::*;

  typedef struct packed {
    logic             recognized;
    logic             illegal;
    logic [CNT_W-1:0] outer_init;
    logic [CNT_W-1:0] outer_end;
    logic [CNT_W-1:0] inner_end;
    uop_t             uop;
    logic             rd_vs1;
    logic             rd_vs2;
    logic             rd_vd;
    logic             wr_vd;
    logic [3:0]       grp_vs1;
    logic [3:0]       grp_vs2;
    logic [3:0]       grp_vd;
    logic             no_overlap;
    logic             mask_dest;
    logic             needs_vtype;  // illegal while vtype.vill is set
  } vdec_sub_t;

  // Decoded view of the instruction shared by all submodules.
  typedef struct packed {
    logic [5:0] funct6;
    logic       vm;
    logic [4:0] vs2;
    logic [4:0] vs1;
    logic [2:0] funct3;
    logic [4:0] vd;
    logic [6:0] opcode;
  } vinstr_t;

  function automatic vdec_sub_t sub_none();
    vdec_sub_t s;
    s = '0;
    s.grp_vs1 = 4'd1;
    s.grp_vs2 = 4'd1;
    s.grp_vd  = 4'd1;
    s.inner_end = CNT_W'(1);
    s.needs_vtype = 1'b1;
    return s;
  endfunction

  // ceil(n / 64)
  function automatic logic [CNT_W-1:0] ndw(logic [VL_W-1:0] n);
    return (CNT_W'(n) + CNT_W'(63)) >> 6;
  endfunction
endpackage
