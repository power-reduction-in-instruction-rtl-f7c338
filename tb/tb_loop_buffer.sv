// tb_loop_buffer: self-checking test of the tagless loop buffer.
//
// Writes random words to random entries while reading random entries, and
// compares each combinational read with a reference copy kept in the
// testbench. Every entry is written once first so all reads are defined.
// Runs at the default size (64 entries).
module tb_loop_buffer;
  localparam int unsigned ENTRIES = 64;
  localparam int unsigned AW = $clog2(ENTRIES);

  logic          clk = 1'b0;
  logic          we;
  logic [AW-1:0] waddr, raddr;
  logic [31:0]   wdata, rdata;
  logic [31:0]   ref_mem [ENTRIES];
  int            checks = 0, failures = 0;

  loop_buffer dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 1'b0; waddr = '0; raddr = '0; wdata = '0;
    // fill every entry
    for (int i = 0; i < ENTRIES; i++) begin
      @(negedge clk);
      we = 1'b1; waddr = AW'(i); wdata = $urandom; ref_mem[i] = wdata;
    end
    @(negedge clk); we = 1'b0;
    // read all back
    for (int i = 0; i < ENTRIES; i++) begin
      raddr = AW'(i); #1;
      checks++;
      if (rdata !== ref_mem[i]) begin
        failures++;
        $display("entry %0d: got %h expected %h", i, rdata, ref_mem[i]);
      end
    end
    // random mixed traffic
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      we    = ($urandom_range(0, 1) == 1);
      waddr = AW'($urandom_range(0, ENTRIES - 1));
      wdata = $urandom;
      raddr = AW'($urandom_range(0, ENTRIES - 1));
      #1;
      checks++;
      if (rdata !== ref_mem[raddr]) begin
        failures++;
        $display("read %0d: got %h expected %h", raddr, rdata, ref_mem[raddr]);
      end
      @(posedge clk);
      if (we) ref_mem[waddr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
