// btb_fd: set-associative branch target buffer with bimodal counters and a
// filled-direction (FD) bit per entry.
//
// Each entry holds a tag, the branch target, the branch kind, a 2-bit
// saturating direction counter (bimodal prediction kept in the entry) and the
// FD bit. The FD bit is the one addition the loop buffer needs: while the
// loop buffer is filled, the controller writes into it the direction that was
// predicted for a forward branch, i.e. whether the buffer holds the
// fall-through or the taken path behind that branch. While the buffer is
// ACTIVE, the controller compares a fresh prediction with the FD bit to tell
// whether the stored path is still the one the core will follow.
//
// Ports and timing:
//   lookup  lk_pc -> lk_pred, combinational, for the instruction being fetched.
//   fd_*    one FD write per cycle into (set of fd_pc, fd_way), at the clock.
//   upd     branch resolved by the execute stage, applied at the clock:
//           a hit trains the counter (and the target when taken); a taken
//           branch that misses allocates an entry (counter weakly taken,
//           FD cleared) and raises alloc for that cycle. Returns are never
//           entered: the core has no return stack and returns stay unpredicted.
// Size 512 sets x 4 ways follows the evaluated configuration. Bimodal
// counters stored in the entries, round-robin replacement per set and the
// allocation-only-when-taken rule are this design's own choices.
module btb_fd
  import lb_pkg::*;
#(
  parameter int unsigned SETS = 512,
  parameter int unsigned WAYS = 4
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // fetch-side lookup
  input  logic [XLEN-1:0]       lk_pc,
  output btb_pred_t             lk_pred,
  // FD write (from the loop-buffer controller)
  input  logic                  fd_we,
  input  logic [XLEN-1:0]       fd_pc,
  input  logic [1:0]            fd_way,
  input  logic                  fd_val,
  // execute-side update
  input  br_resolve_t           upd,
  output logic                  alloc
);

  localparam int unsigned SW   = $clog2(SETS);
  localparam int unsigned TAGW = XLEN - 2 - SW;
  localparam int unsigned WW   = (WAYS > 1) ? $clog2(WAYS) : 1;

  initial begin
    assert (WAYS <= 4) else $fatal(1, "btb_fd: FD way index is 2 bits, WAYS must be <= 4");
  end

  logic [WAYS-1:0]    valid_q [SETS];
  logic [TAGW-1:0]    tag_q   [WAYS][SETS];
  logic [XLEN-1:2]    tgt_q   [WAYS][SETS];
  br_kind_e           kind_q  [WAYS][SETS];
  logic [1:0]         ctr_q   [WAYS][SETS];
  logic               fd_q    [WAYS][SETS];
  logic [WW-1:0]      rr_q    [SETS];

  function automatic logic [SW-1:0] set_of(input logic [XLEN-1:0] pc);
    return pc[SW+1:2];
  endfunction

  function automatic logic [TAGW-1:0] tag_of(input logic [XLEN-1:0] pc);
    return pc[XLEN-1:SW+2];
  endfunction

  // ---------------- lookup ----------------
  logic [SW-1:0] lk_set;
  assign lk_set = set_of(lk_pc);

  always_comb begin
    lk_pred = '0;
    for (int w = 0; w < WAYS; w++) begin
      if (!lk_pred.hit && valid_q[lk_set][w] && tag_q[w][lk_set] == tag_of(lk_pc)) begin
        lk_pred.hit    = 1'b1;
        lk_pred.way    = 2'(w);
        lk_pred.kind   = kind_q[w][lk_set];
        lk_pred.target = {tgt_q[w][lk_set], 2'b00};
        lk_pred.fd     = fd_q[w][lk_set];
        lk_pred.taken  = (kind_q[w][lk_set] != BR_COND) || ctr_q[w][lk_set][1];
      end
    end
  end

  // ---------------- update ----------------
  logic [SW-1:0] up_set;
  logic          up_hit;
  logic [WW-1:0] up_way;
  assign up_set = set_of(upd.pc);

  always_comb begin
    up_hit = 1'b0;
    up_way = '0;
    for (int w = 0; w < WAYS; w++) begin
      if (!up_hit && valid_q[up_set][w] && tag_q[w][up_set] == tag_of(upd.pc)) begin
        up_hit = 1'b1;
        up_way = WW'(w);
      end
    end
  end

  logic upd_en;
  assign upd_en = upd.valid && (upd.kind != BR_RET);
  assign alloc  = upd_en && !up_hit && upd.taken;

  function automatic logic [1:0] ctr_next(input logic [1:0] c, input logic t);
    if (t)  return (c == 2'b11) ? c : c + 2'b01;
    else    return (c == 2'b00) ? c : c - 2'b01;
  endfunction

  // valid bits and replacement pointers are reset; the payload is only read
  // behind a valid bit and needs no reset.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < SETS; s++) begin
        valid_q[s] <= '0;
        rr_q[s]    <= '0;
      end
    end else if (alloc) begin
      valid_q[up_set][rr_q[up_set]] <= 1'b1;
      rr_q[up_set]                  <= rr_q[up_set] + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (fd_we) fd_q[fd_way[WW-1:0]][set_of(fd_pc)] <= fd_val;
    if (upd_en && up_hit) begin
      ctr_q[up_way][up_set] <= ctr_next(ctr_q[up_way][up_set], upd.taken);
      if (upd.taken) tgt_q[up_way][up_set] <= upd.target[XLEN-1:2];
    end else if (alloc) begin
      tag_q [rr_q[up_set]][up_set] <= tag_of(upd.pc);
      tgt_q [rr_q[up_set]][up_set] <= upd.target[XLEN-1:2];
      kind_q[rr_q[up_set]][up_set] <= upd.kind;
      ctr_q [rr_q[up_set]][up_set] <= 2'b10;
      fd_q  [rr_q[up_set]][up_set] <= 1'b0;
    end
  end

endmodule
