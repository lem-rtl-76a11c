// lem_ext_pkg: the request/response bundles between the LEM expander and its
// decoder extensions (the standard extension interface).
//
// Every cycle the expander broadcasts the instruction it is looking at, its two
// loop counters and its busy flag. Each extension answers whether it
// recognises the instruction, whether it is illegal, the counter limits it
// wants for the prepare phase, and the micro-op for the present counter
// values, optionally with a branch of the inner counter (micro-pc).
package lem_ext_pkg;
  import lem_pkg::*;

  typedef struct packed {
    logic [31:0]      instr;
    logic             prepare;   // the cycle in which the instruction is offered
    logic             busy;
    logic [CNT_W-1:0] outer;
    logic [CNT_W-1:0] inner;
  } ext_req_t;

  typedef struct packed {
    logic             recognized;
    logic             illegal;
    logic             wait_hazard;  // prepare must not proceed yet (scoreboard)
    logic [CNT_W-1:0] outer_init;
    logic [CNT_W-1:0] outer_end;
    logic [CNT_W-1:0] inner_end;
    uop_t             uop;
    logic             branch;       // inner counter jumps to branch_target
    logic [CNT_W-1:0] branch_target;
    logic             next_outer;   // end this outer iteration early
  } ext_resp_t;
endpackage
