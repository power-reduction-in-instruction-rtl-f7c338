// fslb_fetch_top: instruction-fetch front end with a forward-branch and
// subroutine bufferable innermost loop buffer, assisted by the BTB.
//
// The block sits between the CPU core's fetch stage and the level-1
// instruction cache (IL1). Innermost loops, including loops with forward
// branches and calls to subroutines without loops, are copied into a small
// tagless loop buffer the first time they run and then fed to the core from
// there, so that the larger IL1 is not accessed. Because the loop buffer is
// read by a plain counter, it can hold only one path through the loop; a
// one-bit filled-direction (FD) field in each BTB entry records which way each
// stored forward branch went, so a changed path is seen at fetch time.
//
// Contents: btb_fd (BTB with bimodal counters and FD bits), loop_buffer
// (ENTRIES words) and lb_controller (IDLE/FILL/ACTIVE), plus the instruction
// select. IL1 and the core stay outside:
//   il1_req/il1_addr -> il1_rdata  IL1 read, combinational in this model; the
//                                  request is low while the loop buffer feeds
//                                  the core (the IL1 stays idle).
//   fetch_valid/fetch_pc           the word the core fetches this cycle;
//   fetch_instr, fetch_from_lb     the word returned in the same cycle and
//                                  where it came from;
//   fetch_pred                     BTB prediction for fetch_pc (the core uses
//                                  it to choose its next fetch address);
//   ex                             branch resolved by the execute stage; the
//                                  core must not fetch in a cycle in which it
//                                  reports a misprediction or a return.
// lb_state, lb_len and lb_events expose the controller for observation.
//
// The three parts and their roles follow the thesis this design is based
// on; the port protocol, the same-cycle IL1 model and the fetch-time BTB
// lookup are this design's own.
module fslb_fetch_top
  import lb_pkg::*;
#(
  parameter int unsigned LB_ENTRIES = 64,   // 256-byte loop buffer
  parameter int unsigned BTB_SETS   = 512,
  parameter int unsigned BTB_WAYS   = 4,
  localparam int unsigned LW        = $clog2(LB_ENTRIES + 1)
) (
  input  logic            clk,
  input  logic            rst_n,
  // core fetch stage
  input  logic            fetch_valid,
  input  logic [XLEN-1:0] fetch_pc,
  output logic [XLEN-1:0] fetch_instr,
  output logic            fetch_from_lb,
  output btb_pred_t       fetch_pred,
  // core execute stage
  input  br_resolve_t     ex,
  // IL1
  output logic            il1_req,
  output logic [XLEN-1:0] il1_addr,
  input  logic [XLEN-1:0] il1_rdata,
  // observation
  output lb_state_e       lb_state,
  output logic [LW-1:0]   lb_len,
  output lb_events_t      lb_events
);

  localparam int unsigned AW = (LB_ENTRIES > 1) ? $clog2(LB_ENTRIES) : 1;

  btb_pred_t       pred;
  logic            alloc;
  logic            from_lb, lb_we, fd_we, fd_val;
  logic [1:0]      fd_way;
  logic [AW-1:0]   lb_raddr, lb_waddr;
  logic [XLEN-1:0] lb_rdata;

  btb_fd #(.SETS(BTB_SETS), .WAYS(BTB_WAYS)) u_btb (
    .clk     (clk),
    .rst_n   (rst_n),
    .lk_pc   (fetch_pc),
    .lk_pred (pred),
    .fd_we   (fd_we),
    .fd_pc   (fetch_pc),
    .fd_way  (fd_way),
    .fd_val  (fd_val),
    .upd     (ex),
    .alloc   (alloc)
  );

  lb_controller #(.ENTRIES(LB_ENTRIES)) u_ctrl (
    .clk         (clk),
    .rst_n       (rst_n),
    .fetch_valid (fetch_valid),
    .fetch_pc    (fetch_pc),
    .pred        (pred),
    .ex          (ex),
    .btb_alloc   (alloc),
    .from_lb     (from_lb),
    .lb_raddr    (lb_raddr),
    .lb_we       (lb_we),
    .lb_waddr    (lb_waddr),
    .fd_we       (fd_we),
    .fd_way      (fd_way),
    .fd_val      (fd_val),
    .state       (lb_state),
    .l_len       (lb_len),
    .ev          (lb_events)
  );

  loop_buffer #(.ENTRIES(LB_ENTRIES), .IW(XLEN)) u_lb (
    .clk   (clk),
    .we    (lb_we),
    .waddr (lb_waddr),
    .wdata (il1_rdata),
    .raddr (lb_raddr),
    .rdata (lb_rdata)
  );

  assign il1_req       = fetch_valid && !from_lb;
  assign il1_addr      = fetch_pc;
  assign fetch_instr   = from_lb ? lb_rdata : il1_rdata;
  assign fetch_from_lb = from_lb;
  assign fetch_pred    = pred;

endmodule
