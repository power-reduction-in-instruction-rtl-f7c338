// tb_fslb_fetch_top: end-to-end test of the loop-buffer fetch front end at
// its default size (64-entry loop buffer, 512-set 4-way BTB).
//
// The testbench plays the core and the IL1. The IL1 is a combinational
// memory whose word at address a is instr_of(a). The core is a five-stage
// pipeline model without return stack: it fetches one word per cycle along
// the BTB prediction, resolves branches D = 3 fetches later in its execute
// stage (so two wrong-path words follow every return, as in a five-stage
// core), redirects on a wrong next address with a one-cycle bubble, and
// freezes on random stall cycles. Branch outcomes come from a synthetic
// program of word-sized instructions:
//   loop A  8 instructions, no forward branch, 20 iterations
//   loop B  13 instructions, two forward branches: one flips direction in
//           blocks of 40 executions (loop buffer misses), one is taken once
//           every 9 executions (mispredictions, new BTB entries)
//   loop C  7 instructions calling two loop-free subroutines, one of which
//           holds a forward branch that is always taken
//   BIG     90 instructions with a taken forward branch, more than the buffer
//   an outer jump back to the start.
// Checks: every fetched word equals the IL1 word at the fetch address
// (whether it came from IL1 or from the loop buffer); the IL1 is requested
// exactly when the loop buffer does not deliver; after C and E the very next
// fetch is served by the loop buffer; every controller action and the cases
// of interest (a return, a call, a taken forward branch and a wrong-path word
// served from the loop buffer) happen at least once; at least 30 % of the
// fetches come from the loop buffer.
module tb_fslb_fetch_top;
  import lb_pkg::*;

  localparam int          NW    = 256;          // program words
  localparam logic [31:0] BASE  = 32'h0000_8000;
  localparam int          D     = 3;            // fetch-to-execute distance
  localparam int          CYCLES = 60000;

  typedef enum int { K_NOP, K_COND, K_JUMP, K_CALL, K_RET } pk_e;
  typedef enum int { R_LOOP, R_BLOCK, R_PERIOD, R_ALWAYS } rule_e;

  pk_e   p_kind [NW];
  int    p_tgt  [NW];
  rule_e p_rule [NW];
  int    p_par  [NW];
  int    p_cnt  [NW];

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        fetch_valid;
  logic [31:0] fetch_pc, fetch_instr, il1_addr, il1_rdata;
  logic        fetch_from_lb, il1_req;
  btb_pred_t   fetch_pred;
  br_resolve_t ex;
  lb_state_e   lb_state;
  logic [6:0]  lb_len;
  lb_events_t  lb_events;

  fslb_fetch_top dut (.clk, .rst_n, .fetch_valid, .fetch_pc, .fetch_instr, .fetch_from_lb,
                      .fetch_pred, .ex, .il1_req, .il1_addr, .il1_rdata, .lb_state, .lb_len,
                      .lb_events);

  always #5 clk = ~clk;

  function automatic logic [31:0] instr_of(input logic [31:0] a);
    return (a * 32'h9E37_79B1) ^ 32'h5A5A_0F0F;
  endfunction

  // IL1: combinational read, garbage when not requested
  assign il1_rdata = il1_req ? instr_of(il1_addr) : 32'hDEAD_BEEF;

  int checks = 0, failures = 0;
  int n_fetch = 0, n_lb = 0, n_il1 = 0;
  int c_b = 0, c_c = 0, c_e = 0, c_f = 0, c_g = 0, c_i = 0, c_j = 0, c_k = 0, c_clr = 0;
  int c_ret_lb = 0, c_call_lb = 0, c_fwd_lb = 0, c_wrong_lb = 0, c_exit = 0;

  task automatic chk(input string what, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL at %0t: %s", $time, what);
    end
  endtask

  function automatic int widx(input logic [31:0] a);
    return int'((a - BASE) >> 2);
  endfunction

  function automatic logic [31:0] addr(input int w);
    return BASE + 32'(w) * 4;
  endfunction

  task automatic emit(input int w, input pk_e k, input int tgt = 0, input rule_e r = R_ALWAYS,
                      input int par = 0);
    p_kind[w] = k; p_tgt[w] = tgt; p_rule[w] = r; p_par[w] = par;
  endtask

  function automatic logic outcome(input int w, input int c);
    case (p_rule[w])
      R_LOOP:   return (c % p_par[w]) != p_par[w] - 1;
      R_BLOCK:  return ((c / p_par[w]) % 2) == 1;
      R_PERIOD: return (c % p_par[w]) == 4;
      default:  return 1'b1;
    endcase
  endfunction

  // pipeline between fetch and execute
  typedef struct {
    logic        valid;
    logic [31:0] pc;
    logic [31:0] pred_next;
    logic        wrong;      // fetched behind an unresolved redirect
  } slot_t;
  slot_t pipe [D];

  logic [31:0] stack [16];
  int          sp = 0;
  logic [31:0] pc_f;
  logic        expect_lb_next = 1'b0;

  initial begin
    repeat (CYCLES + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] next_pc;
    logic        redirect, tk;
    int          w;

    // ---- program
    for (int i = 0; i < NW; i++) begin emit(i, K_NOP); p_cnt[i] = 0; end
    emit(9,   K_COND, 2,  R_LOOP, 20);                       // loop A
    emit(11,  K_COND, 14, R_BLOCK, 40);                      // loop B
    emit(15,  K_COND, 18, R_PERIOD, 9);
    emit(22,  K_COND, 10, R_LOOP, 60);
    emit(24,  K_CALL, 200);                                  // loop C
    emit(27,  K_CALL, 220);
    emit(29,  K_COND, 23, R_LOOP, 30);
    emit(60,  K_COND, 64, R_ALWAYS);                         // BIG loop
    emit(119, K_COND, 30, R_LOOP, 6);
    emit(121, K_JUMP, 0);                                    // outer jump
    emit(201, K_COND, 203, R_ALWAYS);                        // subroutine 1
    emit(204, K_RET);
    emit(222, K_RET);                                        // subroutine 2

    for (int i = 0; i < D; i++) pipe[i] = '{valid: 1'b0, pc: '0, pred_next: '0, wrong: 1'b0};
    fetch_valid = 1'b0; fetch_pc = BASE; ex = '0;
    pc_f = BASE;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    for (int cyc = 0; cyc < CYCLES; cyc++) begin
      @(negedge clk);
      fetch_valid = 1'b0;
      ex          = '0;
      redirect    = 1'b0;
      if ($urandom_range(0, 7) == 0) begin
        #1;   // stall: the whole pipeline holds
      end else begin
        // ---- execute the oldest instruction
        if (pipe[D-1].valid) begin
          w  = widx(pipe[D-1].pc);
          tk = 1'b0;
          next_pc = pipe[D-1].pc + 4;
          case (p_kind[w])
            K_COND: begin
              tk = outcome(w, p_cnt[w]);
              p_cnt[w]++;
              if (tk) next_pc = addr(p_tgt[w]);
            end
            K_JUMP: begin tk = 1'b1; next_pc = addr(p_tgt[w]); end
            K_CALL: begin
              tk = 1'b1; next_pc = addr(p_tgt[w]);
              stack[sp] = pipe[D-1].pc + 4; sp++;
            end
            K_RET: begin tk = 1'b1; sp--; next_pc = stack[sp]; end
            default: ;
          endcase
          redirect = (next_pc != pipe[D-1].pred_next);
          if (p_kind[w] != K_NOP) begin
            ex.valid      = 1'b1;
            ex.pc         = pipe[D-1].pc;
            ex.kind       = (p_kind[w] == K_COND) ? BR_COND :
                            (p_kind[w] == K_JUMP) ? BR_JUMP :
                            (p_kind[w] == K_CALL) ? BR_CALL : BR_RET;
            ex.taken      = tk;
            ex.target     = tk ? next_pc : addr(p_tgt[w]);
            ex.mispredict = redirect;
          end
          pipe[D-1].valid = 1'b0;
          if (redirect) begin
            for (int i = 0; i < D; i++) pipe[i].valid = 1'b0;
            pc_f = next_pc;
          end else begin
            // the words behind this one are on the right path so far
          end
        end
        if (!redirect) begin
          // ---- fetch
          fetch_valid = 1'b1;
          fetch_pc    = pc_f;
        end
        #1;
        if (!redirect) begin
          n_fetch++;
          chk("fetched word matches IL1 contents", fetch_instr == instr_of(fetch_pc));
          chk("IL1 requested iff loop buffer idle", il1_req == !fetch_from_lb);
          if (expect_lb_next) chk("loop buffer serves the fetch after C/E", fetch_from_lb);
          if (fetch_from_lb) begin
            n_lb++;
            w = widx(fetch_pc);
            if (w >= 0 && w < NW) begin
              if (p_kind[w] == K_RET)  c_ret_lb++;
              if (p_kind[w] == K_CALL) c_call_lb++;
              if (p_kind[w] == K_COND && p_tgt[w] > w && fetch_pred.taken) c_fwd_lb++;
              if (w > 0 && p_kind[w-1] == K_RET) c_wrong_lb++;
            end
          end else n_il1++;
          for (int i = D - 1; i > 0; i--) pipe[i] = pipe[i-1];
          pipe[0].valid     = 1'b1;
          pipe[0].pc        = fetch_pc;
          pipe[0].pred_next = (fetch_pred.hit && fetch_pred.taken) ? fetch_pred.target
                                                                   : fetch_pc + 4;
          pc_f = pipe[0].pred_next;
        end
      end
      // ---- controller actions this cycle
      expect_lb_next = fetch_valid && (lb_events.detect_hit || lb_events.fill_done);
      if (lb_events.detect_fill)  c_b++;
      if (lb_events.detect_hit)   c_c++;
      if (lb_events.fill_done)    c_e++;
      if (lb_events.fill_full)    c_f++;
      if (lb_events.fill_mispred) c_g++;
      if (lb_events.lb_miss)      c_i++;
      if (lb_events.act_mispred)  c_j++;
      if (lb_events.big_exit)     c_k++;
      if (lb_events.laddr_clear)  c_clr++;
      if (lb_events.loop_exit)    c_exit++;
    end

    $display("fetches=%0d from loop buffer=%0d (%0d%%) from IL1=%0d", n_fetch, n_lb,
             (100 * n_lb) / n_fetch, n_il1);
    $display("B=%0d C=%0d E=%0d F=%0d G=%0d I=%0d J=%0d K=%0d L_addr-clear=%0d exit=%0d",
             c_b, c_c, c_e, c_f, c_g, c_i, c_j, c_k, c_clr, c_exit);
    $display("from loop buffer: returns=%0d calls=%0d taken forward branches=%0d wrong-path words=%0d",
             c_ret_lb, c_call_lb, c_fwd_lb, c_wrong_lb);
    chk("B (detect and fill) happened",          c_b > 0);
    chk("C (stored loop re-entered) happened",   c_c > 0);
    chk("E (fill complete) happened",            c_e > 0);
    chk("F (BIG loop fills buffer) happened",    c_f > 0);
    chk("G (misprediction while filling) happened", c_g > 0);
    chk("I (loop buffer miss) happened",         c_i > 0);
    chk("J (misprediction while ACTIVE) happened", c_j > 0);
    chk("K (end of partial BIG loop) happened",  c_k > 0);
    chk("L_addr cleared by a new BTB entry",     c_clr > 0);
    chk("return served by the loop buffer",      c_ret_lb > 0);
    chk("call served by the loop buffer",        c_call_lb > 0);
    chk("taken forward branch path served",      c_fwd_lb > 0);
    chk("wrong-path word after return served",   c_wrong_lb > 0);
    chk("loop buffer supplies >= 30% of fetches", n_lb * 10 >= n_fetch * 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
