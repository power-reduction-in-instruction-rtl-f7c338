// tb_fslb_sizes: loop-buffer size sweep of the whole front end.
//
// Runs the end-to-end bench (fslb_bench) at the six buffer sizes of the
// evaluation, 64 B to 2 KB = 16, 32, 64, 128, 256 and 512 instructions, side
// by side on one clock, each with the default 512-set 4-way BTB. Besides the
// per-fetch checks inside every bench it checks how the size shows in the
// behaviour:
//   - the 90-instruction loop overflows the buffer (action F and K occur) at
//     16, 32 and 64 entries and fits whole (no F, no K) at 128 and above;
//   - the share of fetches served by the buffer does not fall by more than
//     one percentage point (random stalls differ between the benches) as
//     the buffer grows, and the largest buffer serves more than the smallest.
module tb_fslb_sizes;
  localparam int NS = 6;
  localparam int CYCLES = 30000;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic done    [NS];
  int   checks_b[NS], fail_b[NS], fetch_b[NS], lb_b[NS], f_b[NS], k_b[NS], e_b[NS];

  fslb_bench #(.LB_ENTRIES(16),  .CYCLES(CYCLES)) b0 (.clk, .done(done[0]), .checks(checks_b[0]), .failures(fail_b[0]), .n_fetch(fetch_b[0]), .n_lb(lb_b[0]), .c_f(f_b[0]), .c_k(k_b[0]), .c_e(e_b[0]));
  fslb_bench #(.LB_ENTRIES(32),  .CYCLES(CYCLES)) b1 (.clk, .done(done[1]), .checks(checks_b[1]), .failures(fail_b[1]), .n_fetch(fetch_b[1]), .n_lb(lb_b[1]), .c_f(f_b[1]), .c_k(k_b[1]), .c_e(e_b[1]));
  fslb_bench #(.LB_ENTRIES(64),  .CYCLES(CYCLES)) b2 (.clk, .done(done[2]), .checks(checks_b[2]), .failures(fail_b[2]), .n_fetch(fetch_b[2]), .n_lb(lb_b[2]), .c_f(f_b[2]), .c_k(k_b[2]), .c_e(e_b[2]));
  fslb_bench #(.LB_ENTRIES(128), .CYCLES(CYCLES)) b3 (.clk, .done(done[3]), .checks(checks_b[3]), .failures(fail_b[3]), .n_fetch(fetch_b[3]), .n_lb(lb_b[3]), .c_f(f_b[3]), .c_k(k_b[3]), .c_e(e_b[3]));
  fslb_bench #(.LB_ENTRIES(256), .CYCLES(CYCLES)) b4 (.clk, .done(done[4]), .checks(checks_b[4]), .failures(fail_b[4]), .n_fetch(fetch_b[4]), .n_lb(lb_b[4]), .c_f(f_b[4]), .c_k(k_b[4]), .c_e(e_b[4]));
  fslb_bench #(.LB_ENTRIES(512), .CYCLES(CYCLES)) b5 (.clk, .done(done[5]), .checks(checks_b[5]), .failures(fail_b[5]), .n_fetch(fetch_b[5]), .n_lb(lb_b[5]), .c_f(f_b[5]), .c_k(k_b[5]), .c_e(e_b[5]));

  int checks = 0, failures = 0;

  task automatic chk(input string what, input logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (CYCLES + 2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit all_done;
    do begin
      @(posedge clk);
      all_done = 1'b1;
      for (int i = 0; i < NS; i++) all_done &= done[i];
    end while (!all_done);
    for (int i = 0; i < NS; i++) begin
      checks   += checks_b[i];
      failures += fail_b[i];
      chk($sformatf("bench %0d served fetches from the buffer", i), lb_b[i] > 0);
      if (i < 3) chk($sformatf("bench %0d: 90-instruction loop overflows (F and K)", i),
                     f_b[i] > 0 && k_b[i] > 0);
      else       chk($sformatf("bench %0d: 90-instruction loop fits (no F, no K)", i),
                     f_b[i] == 0 && k_b[i] == 0);
      if (i > 0) chk($sformatf("bench %0d: buffer share not below the smaller size", i),
                     100 * longint'(lb_b[i]) * fetch_b[i-1] >= 99 * longint'(lb_b[i-1]) * fetch_b[i]);
    end
    chk("largest buffer serves more than the smallest",
        longint'(lb_b[NS-1]) * fetch_b[0] > longint'(lb_b[0]) * fetch_b[NS-1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
