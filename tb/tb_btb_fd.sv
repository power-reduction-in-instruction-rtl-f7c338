// tb_btb_fd: self-checking test of the BTB with FD bits.
//
// A pool of 48 branch addresses, all mapping onto four sets, is looked up,
// trained and FD-written at random, so entries are allocated, trained,
// replaced and their FD bits overwritten. A reference model in the testbench
// (per-set valid/tag/target/kind/counter/FD arrays, round-robin victim) gives
// the expected lookup result and allocation pulse every cycle. Directed
// checks at the start cover a first allocation, counter saturation and the
// rule that returns are never entered. Default size (512 sets, 4 ways).
module tb_btb_fd;
  import lb_pkg::*;

  localparam int unsigned SETS = 512;
  localparam int unsigned WAYS = 4;
  localparam int unsigned POOL = 48;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic [31:0] lk_pc, fd_pc;
  btb_pred_t   lk_pred;
  logic        fd_we, fd_val, alloc;
  logic [1:0]  fd_way;
  br_resolve_t upd;
  int          checks = 0, failures = 0;

  btb_fd dut (.clk, .rst_n, .lk_pc, .lk_pred, .fd_we, .fd_pc, .fd_way, .fd_val, .upd, .alloc);

  always #5 clk = ~clk;

  // reference model
  logic       r_valid [SETS][WAYS];
  logic [20:0] r_tag  [SETS][WAYS];
  logic [31:0] r_tgt  [SETS][WAYS];
  br_kind_e   r_kind  [SETS][WAYS];
  logic [1:0] r_ctr   [SETS][WAYS];
  logic       r_fd    [SETS][WAYS];
  int         r_rr    [SETS];

  logic [31:0] pool_pc   [POOL];
  br_kind_e    pool_kind [POOL];

  function automatic btb_pred_t ref_lookup(input logic [31:0] pc);
    btb_pred_t p = '0;
    int s = int'(pc[10:2]);
    for (int w = 0; w < WAYS; w++)
      if (!p.hit && r_valid[s][w] && r_tag[s][w] == pc[31:11]) begin
        p.hit = 1; p.way = 2'(w); p.kind = r_kind[s][w]; p.target = r_tgt[s][w];
        p.fd = r_fd[s][w]; p.taken = (r_kind[s][w] != BR_COND) || r_ctr[s][w][1];
      end
    return p;
  endfunction

  function automatic logic ref_alloc(input br_resolve_t u);
    btb_pred_t p = ref_lookup(u.pc);
    return u.valid && u.kind != BR_RET && !p.hit && u.taken;
  endfunction

  task automatic ref_clock(input logic fwe, input logic [31:0] fpc, input logic [1:0] fway,
                           input logic fv, input br_resolve_t u);
    btb_pred_t p = ref_lookup(u.pc);
    int s = int'(u.pc[10:2]);
    int w;
    if (fwe) r_fd[int'(fpc[10:2])][fway] = fv;
    if (u.valid && u.kind != BR_RET) begin
      if (p.hit) begin
        w = int'(p.way);
        if (u.taken) begin
          if (r_ctr[s][w] != 3) r_ctr[s][w]++;
          r_tgt[s][w] = {u.target[31:2], 2'b00};
        end else if (r_ctr[s][w] != 0) r_ctr[s][w]--;
      end else if (u.taken) begin
        w = r_rr[s];
        r_valid[s][w] = 1; r_tag[s][w] = u.pc[31:11]; r_tgt[s][w] = {u.target[31:2], 2'b00};
        r_kind[s][w] = u.kind; r_ctr[s][w] = 2'b10; r_fd[s][w] = 0;
        r_rr[s] = (r_rr[s] + 1) % WAYS;
      end
    end
  endtask

  task automatic compare(input string what);
    btb_pred_t e = ref_lookup(lk_pc);
    checks++;
    if (lk_pred.hit !== e.hit ||
        (e.hit && (lk_pred.taken !== e.taken || lk_pred.target !== e.target ||
                   lk_pred.kind !== e.kind || lk_pred.fd !== e.fd || lk_pred.way !== e.way))) begin
      failures++;
      $display("%s pc=%h: got hit=%b t=%b tgt=%h k=%0d fd=%b w=%0d exp hit=%b t=%b tgt=%h k=%0d fd=%b w=%0d",
               what, lk_pc, lk_pred.hit, lk_pred.taken, lk_pred.target, lk_pred.kind, lk_pred.fd,
               lk_pred.way, e.hit, e.taken, e.target, e.kind, e.fd, e.way);
    end
    checks++;
    if (alloc !== ref_alloc(upd)) begin
      failures++;
      $display("%s alloc=%b expected %b", what, alloc, ref_alloc(upd));
    end
  endtask

  // one cycle: drive at negedge, compare, clock both DUT and model
  task automatic cycle(input string what);
    #1 compare(what);
    @(posedge clk);
    ref_clock(fd_we, fd_pc, fd_way, fd_val, upd);
    @(negedge clk);
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < SETS; s++) begin
      r_rr[s] = 0;
      for (int w = 0; w < WAYS; w++) begin
        r_valid[s][w] = 0; r_tag[s][w] = '0; r_tgt[s][w] = '0; r_kind[s][w] = BR_COND;
        r_ctr[s][w] = '0; r_fd[s][w] = 0;
      end
    end
    for (int i = 0; i < POOL; i++) begin
      // sets 3..6, twelve different tags each
      pool_pc[i]   = {11'(i / 4 + 1), 10'd0, 9'(3 + i % 4), 2'b00};
      pool_kind[i] = br_kind_e'(i % 4);
    end
    lk_pc = pool_pc[0]; fd_pc = '0; fd_we = 0; fd_val = 0; fd_way = 0; upd = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    // directed: empty BTB misses
    lk_pc = pool_pc[0]; cycle("empty");
    // a taken conditional branch allocates
    upd = '{valid: 1, pc: pool_pc[0], kind: BR_COND, taken: 1, target: 32'h0000_0040, mispredict: 1};
    cycle("alloc");
    upd = '0;
    lk_pc = pool_pc[0]; cycle("after alloc");
    checks++; if (!(lk_pred.hit && lk_pred.taken && lk_pred.target == 32'h40)) begin
      failures++; $display("first allocation not visible");
    end
    // not-taken twice: weakly taken -> strongly not taken side
    upd = '{valid: 1, pc: pool_pc[0], kind: BR_COND, taken: 0, target: 32'h0, mispredict: 1};
    cycle("nt1"); cycle("nt2"); cycle("nt3");
    upd = '0; cycle("nt check");
    checks++; if (lk_pred.taken !== 1'b0) begin failures++; $display("counter did not train"); end
    // a return never allocates
    upd = '{valid: 1, pc: pool_pc[3], kind: BR_RET, taken: 1, target: 32'h80, mispredict: 0};
    lk_pc = pool_pc[3]; cycle("ret");
    upd = '0; cycle("ret check");
    checks++; if (lk_pred.hit !== 1'b0) begin failures++; $display("return entered in BTB"); end
    // FD write on the hit way
    lk_pc = pool_pc[0]; #1;
    fd_we = 1; fd_pc = pool_pc[0]; fd_way = lk_pred.way; fd_val = 1; cycle("fd write");
    fd_we = 0; cycle("fd check");
    checks++; if (lk_pred.fd !== 1'b1) begin failures++; $display("FD bit not written"); end

    // random traffic
    for (int n = 0; n < 8000; n++) begin
      int k = $urandom_range(0, POOL - 1);
      int j = $urandom_range(0, POOL - 1);
      lk_pc  = pool_pc[k];
      upd.valid  = ($urandom_range(0, 3) != 0);
      upd.pc     = pool_pc[j];
      upd.kind   = pool_kind[j];
      upd.taken  = (pool_kind[j] != BR_COND) || ($urandom_range(0, 2) != 0);
      upd.target = {16'h0, 14'($urandom_range(0, 16383)), 2'b00};
      upd.mispredict = 0;
      #1;
      fd_we  = ($urandom_range(0, 2) == 0);
      fd_pc  = lk_pc;
      fd_way = lk_pred.hit ? lk_pred.way : 2'($urandom_range(0, 3));
      fd_val = 1'($urandom_range(0, 1));
      cycle("random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
