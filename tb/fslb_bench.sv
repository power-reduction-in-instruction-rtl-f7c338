// fslb_bench: the end-to-end bench of tb_fslb_fetch_top packaged as a module
// with the loop-buffer size as a parameter, so that several sizes can run side
// by side. It plays the core (five-stage model, no return stack, two
// wrong-path words behind every return, random stalls) and the IL1 for one
// fslb_fetch_top instance, runs the same synthetic program (plain loop, loop
// with two forward branches, loop calling two loop-free subroutines,
// 90-instruction loop, outer jump), checks every fetched word against the IL1
// contents and IL1 idleness while the buffer delivers, and reports its counts
// on its outputs when done rises.
module fslb_bench
  import lb_pkg::*;
#(
  parameter int unsigned LB_ENTRIES = 64,
  parameter int          CYCLES     = 60000
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures,
  output int   n_fetch,
  output int   n_lb,
  output int   c_f,
  output int   c_k,
  output int   c_e
);

  localparam int          NW    = 256;          // program words
  localparam logic [31:0] BASE  = 32'h0000_8000;
  localparam int          D     = 3;            // fetch-to-execute distance

  typedef enum int { K_NOP, K_COND, K_JUMP, K_CALL, K_RET } pk_e;
  typedef enum int { R_LOOP, R_BLOCK, R_PERIOD, R_ALWAYS } rule_e;

  pk_e   p_kind [NW];
  int    p_tgt  [NW];
  rule_e p_rule [NW];
  int    p_par  [NW];
  int    p_cnt  [NW];

  logic        rst_n = 1'b0;
  logic        fetch_valid;
  logic [31:0] fetch_pc, fetch_instr, il1_addr, il1_rdata;
  logic        fetch_from_lb, il1_req;
  btb_pred_t   fetch_pred;
  br_resolve_t ex;
  lb_state_e   lb_state;
  logic [$clog2(LB_ENTRIES+1)-1:0] lb_len;
  lb_events_t  lb_events;

  fslb_fetch_top #(.LB_ENTRIES(LB_ENTRIES)) dut (.clk, .rst_n, .fetch_valid, .fetch_pc, .fetch_instr, .fetch_from_lb,
                      .fetch_pred, .ex, .il1_req, .il1_addr, .il1_rdata, .lb_state, .lb_len,
                      .lb_events);


  function automatic logic [31:0] instr_of(input logic [31:0] a);
    return (a * 32'h9E37_79B1) ^ 32'h5A5A_0F0F;
  endfunction

  // IL1: combinational read, garbage when not requested
  assign il1_rdata = il1_req ? instr_of(il1_addr) : 32'hDEAD_BEEF;

  int n_il1 = 0;
  int c_b = 0, c_c = 0, c_g = 0, c_i = 0, c_j = 0, c_clr = 0;
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
    logic [31:0] next_pc;
    logic        redirect, tk;
    int          w;
    done = 1'b0; checks = 0; failures = 0; n_fetch = 0; n_lb = 0;
    c_f = 0; c_k = 0; c_e = 0;

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

    $display("LB_ENTRIES=%0d: fetches=%0d from loop buffer=%0d (%0d%%) F=%0d K=%0d E=%0d",
             LB_ENTRIES, n_fetch, n_lb, (100 * n_lb) / n_fetch, c_f, c_k, c_e);
    done = 1'b1;
  end
endmodule
