// lb_controller: loop-buffer controller of the forward-branch and subroutine
// bufferable innermost loop buffer.
//
// A three-state machine decides, for every fetch, whether the instruction
// comes from the level-1 instruction cache (IL1) or from the loop buffer, and
// when the loop buffer is written.
//
//   IDLE    Fetch from IL1 and look for an innermost loop: a loop-closing
//           branch (conditional or unconditional, not a call or return) that
//           the BTB predicts taken to a target at or below its own address.
//           One such branch is enough (FILL-1). Its address is the loop's end
//           address and is what L_addr holds (END). If it equals a valid
//           L_addr the loop is already stored: go ACTIVE (C); else record it
//           in L_addr and go FILL (B).
//   FILL    Fetch from IL1 and copy every fetched word into the next entry,
//           whatever its kind, so the buffer holds the trace exactly as
//           fetched: the path chosen at each forward branch, the body of any
//           called subroutine, and the wrong-path words fetched behind an
//           unpredicted return (the core discards them; keeping them keeps
//           the stored sequence equal to the fetch sequence). For each
//           forward conditional branch the predicted direction is written to
//           its FD bit. When the end branch is fetched again and predicted
//           taken, L_len is recorded and the state goes ACTIVE (E). A full
//           buffer before that (BIG loop) goes IDLE with the first part
//           kept (F). A misprediction abandons the fill (G, GOTO IDLE).
//   ACTIVE  The loop buffer feeds the core, IL1 is not accessed. A counter
//           walks the entries and wraps after the end branch. A forward
//           branch whose fresh prediction differs from its FD bit is a loop
//           buffer miss: its FD bit is rewritten and filling resumes at the
//           next entry (I, aFILL). A misprediction goes IDLE without
//           changing the buffer (J, aIDLE). After the last entry of a
//           partial (BIG) loop the state goes IDLE (K).
//
// Whenever the BTB allocates a new entry, L_addr is invalidated: the new
// entry may have displaced an FD bit that the stored path depends on.
//
// Interface and timing: fetch_valid/fetch_pc name the word the core fetches
// this cycle; pred is the BTB lookup of fetch_pc in the same cycle. The
// source select (from_lb, lb_raddr) and the write controls (lb_we, fd_we) are
// combinational for that fetch; state changes at the clock. ex is the branch
// resolved by the core's execute stage. The core must not fetch in a cycle in
// which it reports a redirect (a misprediction or a return); it fetches the
// corrected address from the next cycle on.
//
// The policy set (FILL-1, END, GOTO IDLE, aFILL, aIDLE), the three states and
// the actions follow the thesis this design is based on. The choice to treat
// a second, different loop-closing branch met while filling as a more inner
// loop and restart the fill on it, the handling of a predicted loop exit
// while filling or ACTIVE, and the invalidation of L_addr in every state are
// this design's own.
module lb_controller
  import lb_pkg::*;
#(
  parameter int unsigned ENTRIES = 64,
  localparam int unsigned AW     = (ENTRIES > 1) ? $clog2(ENTRIES) : 1,
  localparam int unsigned LW     = $clog2(ENTRIES + 1)
) (
  input  logic            clk,
  input  logic            rst_n,
  // fetch stage
  input  logic            fetch_valid,
  input  logic [XLEN-1:0] fetch_pc,
  input  btb_pred_t       pred,
  // execute stage
  input  br_resolve_t     ex,
  input  logic            btb_alloc,
  // instruction source
  output logic            from_lb,
  output logic [AW-1:0]   lb_raddr,
  // loop buffer write
  output logic            lb_we,
  output logic [AW-1:0]   lb_waddr,
  // FD-bit write
  output logic            fd_we,
  output logic [1:0]      fd_way,
  output logic            fd_val,
  // observation
  output lb_state_e       state,
  output logic [LW-1:0]   l_len,
  output lb_events_t      ev
);

  lb_state_e       state_q, state_d;
  logic [XLEN-1:0] laddr_q, laddr_d;     // L_addr: end address of the stored loop
  logic            lvalid_q, lvalid_d;   // L_addr holds a usable loop
  logic            lcomp_q, lcomp_d;     // stored trace ends with the end branch
  logic [LW-1:0]   llen_q, llen_d;       // L_len: number of stored entries
  logic [AW-1:0]   idx_q, idx_d;         // fill position / fetch position

  // classification of the fetched instruction from its BTB lookup
  logic loop_br, fwd_cond, at_end, mispred;
  assign loop_br  = pred.hit && pred.taken && (pred.kind inside {BR_COND, BR_JUMP})
                    && (pred.target <= fetch_pc);
  assign fwd_cond = pred.hit && (pred.kind == BR_COND) && (pred.target > fetch_pc);
  assign at_end   = lvalid_q && (fetch_pc == laddr_q);
  assign mispred  = ex.valid && ex.mispredict && (ex.kind != BR_RET);

  localparam logic [AW-1:0] LAST = AW'(ENTRIES - 1);

  always_comb begin
    state_d  = state_q;
    laddr_d  = laddr_q;
    lvalid_d = lvalid_q;
    lcomp_d  = lcomp_q;
    llen_d   = llen_q;
    idx_d    = idx_q;
    from_lb  = 1'b0;
    lb_raddr = idx_q;
    lb_we    = 1'b0;
    lb_waddr = idx_q;
    fd_we    = 1'b0;
    fd_way   = pred.way;
    fd_val   = pred.taken;
    ev       = '0;

    unique case (state_q)
      LB_IDLE: begin
        if (fetch_valid && loop_br) begin
          if (at_end) begin                       // C
            ev.detect_hit = 1'b1;
            state_d       = LB_ACTIVE;
            idx_d         = '0;
          end else begin                          // B
            ev.detect_fill = 1'b1;
            state_d        = LB_FILL;
            laddr_d        = fetch_pc;
            lvalid_d       = 1'b1;
            lcomp_d        = 1'b0;
            idx_d          = '0;
          end
        end
      end

      LB_FILL: begin
        if (mispred) begin                        // G (GOTO IDLE)
          ev.fill_mispred = 1'b1;
          state_d         = LB_IDLE;
          lvalid_d        = 1'b0;
        end else if (fetch_valid) begin
          lb_we = 1'b1;                           // D
          fd_we = fwd_cond;
          if (at_end) begin
            llen_d  = LW'(idx_q) + LW'(1);
            lcomp_d = 1'b1;
            if (pred.taken) begin                 // E
              ev.fill_done = 1'b1;
              state_d      = LB_ACTIVE;
              idx_d        = '0;
            end else begin                        // loop exit predicted
              ev.loop_exit = 1'b1;
              state_d      = LB_IDLE;
            end
          end else if (loop_br) begin             // a more inner loop: B again
            ev.detect_fill = 1'b1;
            laddr_d        = fetch_pc;
            lcomp_d        = 1'b0;
            idx_d          = '0;
          end else if (idx_q == LAST) begin       // F (BIG loop)
            ev.fill_full = 1'b1;
            llen_d       = LW'(ENTRIES);
            lcomp_d      = 1'b0;
            state_d      = LB_IDLE;
          end else begin
            idx_d = idx_q + 1'b1;
          end
        end
      end

      LB_ACTIVE: begin
        from_lb = 1'b1;                           // H
        if (mispred) begin                        // J (aIDLE)
          ev.act_mispred = 1'b1;
          state_d        = LB_IDLE;
        end else if (fetch_valid) begin
          if (fwd_cond && (pred.taken != pred.fd)) begin  // I (aFILL)
            ev.lb_miss = 1'b1;
            fd_we      = 1'b1;
            lcomp_d    = 1'b0;
            if (idx_q == LAST) begin              // nothing left to refill
              ev.fill_full = 1'b1;
              llen_d       = LW'(ENTRIES);
              state_d      = LB_IDLE;
            end else begin
              state_d = LB_FILL;
              idx_d   = idx_q + 1'b1;
            end
          end else if (LW'(idx_q) + LW'(1) == llen_q) begin
            if (!lcomp_q) begin                   // K (BIG loop)
              ev.big_exit = 1'b1;
              state_d     = LB_IDLE;
            end else if (at_end && pred.taken) begin
              idx_d = '0;                         // next iteration
            end else begin                        // loop exit predicted
              ev.loop_exit = 1'b1;
              state_d      = LB_IDLE;
            end
          end else begin
            idx_d = idx_q + 1'b1;
          end
        end
      end

      default: state_d = LB_IDLE;
    endcase

    // a new BTB entry may have replaced an FD bit of the stored path
    if (btb_alloc && lvalid_d) begin
      ev.laddr_clear = 1'b1;
      lvalid_d       = 1'b0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q  <= LB_IDLE;
      laddr_q  <= '0;
      lvalid_q <= 1'b0;
      lcomp_q  <= 1'b0;
      llen_q   <= '0;
      idx_q    <= '0;
    end else begin
      state_q  <= state_d;
      laddr_q  <= laddr_d;
      lvalid_q <= lvalid_d;
      lcomp_q  <= lcomp_d;
      llen_q   <= llen_d;
      idx_q    <= idx_d;
    end
  end

  assign state = state_q;
  assign l_len = llen_q;

  // The core does not fetch in the cycle in which it reports a redirect.
  a_no_fetch_on_redirect: assert property (@(posedge clk) disable iff (!rst_n)
    !(fetch_valid && ex.valid && (ex.mispredict || ex.kind == BR_RET)));

endmodule
