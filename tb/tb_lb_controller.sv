// tb_lb_controller: directed, self-checking test of the loop-buffer
// controller with the BTB replaced by driven predictions.
//
// Walks the controller through every action of its state diagram with
// hand-worked expected values: detection and fill of a loop with a forward
// branch (B, D, E), FD write, ACTIVE fetching with wrap-around (H), a loop
// buffer miss with refill from the next entry (I), a misprediction while
// ACTIVE (J), re-entry of the stored loop from IDLE (C), a predicted loop
// exit, a misprediction while filling (G), a BIG loop that overflows the
// buffer (F) and is later partly fed from it (K), a more inner loop met while
// filling, and L_addr invalidation by a new BTB entry. Each fetch is checked
// for source, read/write index and FD write; each action for its pulse and
// the following state. Default size (64 entries).
module tb_lb_controller;
  import lb_pkg::*;

  localparam int unsigned ENTRIES = 64;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        fetch_valid;
  logic [31:0] fetch_pc;
  btb_pred_t   pred;
  br_resolve_t ex;
  logic        btb_alloc;
  logic        from_lb, lb_we, fd_we, fd_val;
  logic [5:0]  lb_raddr, lb_waddr;
  logic [1:0]  fd_way;
  lb_state_e   state;
  logic [6:0]  l_len;
  lb_events_t  ev;
  int          checks = 0, failures = 0;

  lb_controller dut (.clk, .rst_n, .fetch_valid, .fetch_pc, .pred, .ex, .btb_alloc,
                     .from_lb, .lb_raddr, .lb_we, .lb_waddr, .fd_we, .fd_way, .fd_val,
                     .state, .l_len, .ev);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input string what, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL at %0t: %s (state=%s idx r%0d w%0d len=%0d ev=%b)", $time, what,
               state.name(), lb_raddr, lb_waddr, l_len, ev);
    end
  endtask

  // drive one fetch; non-branches miss in the BTB
  task automatic fetch(input logic [31:0] pc, input logic hit = 1'b0, input logic taken = 1'b0,
                       input logic [31:0] tgt = '0, input br_kind_e kind = BR_COND,
                       input logic fd = 1'b0);
    fetch_valid = 1'b1;
    fetch_pc    = pc;
    pred        = '{hit: hit, taken: hit && taken, target: tgt, kind: kind, fd: fd, way: 2'd2};
    ex          = '0;
    btb_alloc   = 1'b0;
    #1;
  endtask

  task automatic mispredict(input logic alloc = 1'b0);
    fetch_valid = 1'b0;
    pred        = '0;
    ex          = '{valid: 1, pc: 32'h0, kind: BR_COND, taken: 1, target: 32'h0, mispredict: 1};
    btb_alloc   = alloc;
    #1;
  endtask

  task automatic tick();
    @(posedge clk);
    @(negedge clk);
    fetch_valid = 1'b0; pred = '0; ex = '0; btb_alloc = 1'b0;
  endtask

  // fetch a straight run of non-branches and check each source/index
  task automatic run_fill(input logic [31:0] pc0, input int n, input int idx0);
    for (int i = 0; i < n; i++) begin
      fetch(pc0 + 4 * i);
      chk("fill from IL1", !from_lb && lb_we && lb_waddr == 6'(idx0 + i) && !fd_we);
      tick();
    end
  endtask

  task automatic run_active(input logic [31:0] pc0, input int n, input int idx0);
    for (int i = 0; i < n; i++) begin
      fetch(pc0 + 4 * i);
      chk("fetch from LB", from_lb && !lb_we && lb_raddr == 6'(idx0 + i));
      tick();
    end
  endtask

  localparam logic [31:0] HEAD = 32'h100, FWD = 32'h108, FTGT = 32'h110, ENDB = 32'h11C;

  initial begin
    fetch_valid = 0; fetch_pc = 0; pred = '0; ex = '0; btb_alloc = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    // ---- IDLE: plain fetches come from IL1, nothing written
    fetch(32'h0F0);
    chk("idle from IL1", state == LB_IDLE && !from_lb && !lb_we && ev == '0);
    tick();

    // ---- B: loop branch predicted taken backwards
    fetch(ENDB, 1, 1, HEAD);
    chk("B pulse", ev.detect_fill && !ev.detect_hit);
    tick();
    chk("B -> FILL", state == LB_FILL);

    // ---- D: fill 100, 104, 108 (forward branch taken), 110, 114, 118, 11C
    run_fill(HEAD, 2, 0);
    fetch(FWD, 1, 1, FTGT);
    chk("forward branch FD write", lb_we && lb_waddr == 2 && fd_we && fd_val && fd_way == 2);
    tick();
    run_fill(FTGT, 3, 3);
    fetch(ENDB, 1, 1, HEAD);
    chk("E pulse", ev.fill_done && lb_we && lb_waddr == 6);
    tick();
    chk("E -> ACTIVE, L_len 7", state == LB_ACTIVE && l_len == 7);

    // ---- H: one iteration from the buffer, wrap at the end branch
    run_active(HEAD, 2, 0);
    fetch(FWD, 1, 1, FTGT, BR_COND, 1);
    chk("FD agrees", from_lb && lb_raddr == 2 && !ev.lb_miss && !fd_we);
    tick();
    run_active(FTGT, 3, 3);
    fetch(ENDB, 1, 1, HEAD);
    chk("end branch from LB", from_lb && lb_raddr == 6 && ev == '0);
    tick();
    fetch(HEAD);
    chk("wrapped to entry 0", state == LB_ACTIVE && from_lb && lb_raddr == 0);
    tick();
    run_active(HEAD + 4, 1, 1);

    // ---- I: forward branch now predicted not taken, FD says taken
    fetch(FWD, 1, 0, FTGT, BR_COND, 1);
    chk("I pulse", ev.lb_miss && from_lb && lb_raddr == 2 && fd_we && !fd_val);
    tick();
    chk("I -> FILL", state == LB_FILL);
    run_fill(32'h10C, 4, 3);
    fetch(ENDB, 1, 1, HEAD);
    chk("refill done", ev.fill_done && lb_waddr == 7);
    tick();
    chk("refill L_len 8", state == LB_ACTIVE && l_len == 8);
    run_active(HEAD, 2, 0);
    fetch(FWD, 1, 0, FTGT, BR_COND, 0);
    chk("new path agrees", from_lb && !ev.lb_miss);
    tick();

    // ---- J: misprediction while ACTIVE
    mispredict();
    chk("J pulse", ev.act_mispred && from_lb);
    tick();
    chk("J -> IDLE", state == LB_IDLE);
    fetch(32'h300);
    chk("IDLE after J from IL1", !from_lb && !lb_we);
    tick();

    // ---- C: the stored loop is entered again
    fetch(ENDB, 1, 1, HEAD);
    chk("C pulse", ev.detect_hit && !ev.detect_fill && !from_lb);
    tick();
    chk("C -> ACTIVE", state == LB_ACTIVE);
    run_active(HEAD, 2, 0);
    fetch(FWD, 1, 0, FTGT, BR_COND, 0);
    tick();
    run_active(32'h10C, 4, 3);
    // predicted exit at the end branch
    fetch(ENDB, 1, 0, HEAD);
    chk("loop exit pulse", ev.loop_exit && from_lb && lb_raddr == 7);
    tick();
    chk("exit -> IDLE", state == LB_IDLE && l_len == 8);

    // ---- G: misprediction while filling a new loop
    fetch(32'h21C, 1, 1, 32'h200);
    chk("B for second loop", ev.detect_fill);
    tick();
    run_fill(32'h200, 3, 0);
    mispredict();
    chk("G pulse", ev.fill_mispred);
    tick();
    chk("G -> IDLE", state == LB_IDLE);
    fetch(32'h21C, 1, 1, 32'h200);
    chk("L_addr dropped after G", ev.detect_fill && !ev.detect_hit);
    tick();

    // ---- a more inner loop met while filling restarts the fill
    run_fill(32'h200, 2, 0);
    fetch(32'h208, 1, 1, 32'h204);
    chk("inner loop restarts fill", ev.detect_fill && state == LB_FILL);
    tick();
    fetch(32'h204);
    chk("restart at entry 0", lb_we && lb_waddr == 0);
    tick();
    fetch(32'h208, 1, 1, 32'h204);
    chk("inner loop filled", ev.fill_done && lb_waddr == 1);
    tick();
    chk("inner L_len 2", l_len == 2 && state == LB_ACTIVE);
    mispredict();
    tick();

    // ---- F and K: a 100-instruction loop
    fetch(32'h500 + 4 * 99, 1, 1, 32'h500);
    chk("B for BIG loop", ev.detect_fill);
    tick();
    run_fill(32'h500, 63, 0);
    fetch(32'h500 + 4 * 63);
    chk("F pulse", ev.fill_full && lb_waddr == 63);
    tick();
    chk("F -> IDLE, L_len 64", state == LB_IDLE && l_len == 64);
    for (int i = 64; i < 99; i++) begin
      fetch(32'h500 + 4 * i);
      chk("BIG tail from IL1", !from_lb && !lb_we);
      tick();
    end
    fetch(32'h500 + 4 * 99, 1, 1, 32'h500);
    chk("C for BIG loop", ev.detect_hit);
    tick();
    run_active(32'h500, 63, 0);
    fetch(32'h500 + 4 * 63);
    chk("K pulse", ev.big_exit && from_lb && lb_raddr == 63);
    tick();
    chk("K -> IDLE", state == LB_IDLE);
    fetch(32'h500 + 4 * 64);
    chk("after K from IL1", !from_lb);
    tick();

    // ---- a new BTB entry clears L_addr
    mispredict(1);
    chk("L_addr clear pulse", ev.laddr_clear);
    tick();
    fetch(32'h500 + 4 * 99, 1, 1, 32'h500);
    chk("stored BIG loop forgotten", ev.detect_fill && !ev.detect_hit);
    tick();

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
