// lb_pkg: types and constants shared by the loop-buffer fetch front end.
//
// The front end sits between a 32-bit RISC core (ARM-like, word-aligned
// fixed-length instructions) and its level-1 instruction cache. It holds the
// controller state encoding, the branch kinds the branch target buffer (BTB)
// records, the prediction a BTB lookup returns at fetch, and the branch
// resolution the core reports from its execute stage.
package lb_pkg;

  localparam int unsigned XLEN = 32;  // address and instruction width

  // Controller states (IDLE: detect a loop; FILL: copy the fetched trace into
  // the loop buffer; ACTIVE: feed the core from the loop buffer).
  typedef enum logic [1:0] {
    LB_IDLE   = 2'd0,
    LB_FILL   = 2'd1,
    LB_ACTIVE = 2'd2
  } lb_state_e;

  // Kind of a control-transfer instruction as recorded in the BTB.
  typedef enum logic [1:0] {
    BR_COND = 2'd0,  // conditional direct branch
    BR_JUMP = 2'd1,  // unconditional direct branch
    BR_CALL = 2'd2,  // subroutine call (branch and link)
    BR_RET  = 2'd3   // subroutine return (never predicted: no return stack)
  } br_kind_e;

  // Result of a BTB lookup for the instruction being fetched.
  typedef struct packed {
    logic             hit;     // a valid entry matches the fetch PC
    logic             taken;   // predicted direction (false on a miss)
    logic [XLEN-1:0]  target;  // predicted target (valid when hit)
    br_kind_e         kind;    // kind of the matching branch
    logic             fd;      // filled-direction bit of the matching entry
    logic [1:0]       way;     // matching way (for the FD write-back)
  } btb_pred_t;

  // A branch resolved by the core's execute stage.
  typedef struct packed {
    logic             valid;       // a control transfer resolved this cycle
    logic [XLEN-1:0]  pc;          // its address
    br_kind_e         kind;        // its kind
    logic             taken;       // actual direction
    logic [XLEN-1:0]  target;      // actual target
    logic             mispredict;  // fetch followed a wrong direction/target
  } br_resolve_t;

  // One-cycle pulses naming the controller's actions (letters of the state
  // diagram), used for observation and testing.
  typedef struct packed {
    logic detect_fill;   // B: new innermost loop detected, start filling
    logic detect_hit;    // C: detected loop is the stored one, go ACTIVE
    logic fill_done;     // E: whole iteration filled, go ACTIVE
    logic fill_full;     // F: buffer full before the loop end (BIG loop)
    logic fill_mispred;  // G: misprediction while filling, give up
    logic lb_miss;       // I: prediction differs from FD bit, refill
    logic act_mispred;   // J: misprediction while ACTIVE, go IDLE
    logic big_exit;      // K: last entry of a partial (BIG) loop fetched
    logic loop_exit;     // loop-closing branch predicted not taken
    logic laddr_clear;   // L_addr invalidated by a new BTB entry
  } lb_events_t;

endpackage
