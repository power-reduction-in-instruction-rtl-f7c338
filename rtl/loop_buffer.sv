// loop_buffer: tagless instruction store of the loop-buffer front end.
//
// ENTRIES words of IW bits, one instruction per entry and no tags. The
// controller addresses it with plain counters, so entries hold the loop's
// instructions in the order they were fetched (the stored execution path),
// not in address order. One synchronous write port (used while filling) and
// one combinational read port (used while ACTIVE, so the word is delivered in
// the same cycle as the fetch, like the cache it replaces).
// Default size 64 entries = 256 bytes of 32-bit instructions, the size the
// evaluation uses as its reference point; 16..512 entries were studied.
// Contents are not reset: nothing is read before it has been written.
module loop_buffer #(
  parameter int unsigned ENTRIES = 64,
  parameter int unsigned IW      = 32,
  localparam int unsigned AW     = (ENTRIES > 1) ? $clog2(ENTRIES) : 1
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [IW-1:0] wdata,
  input  logic [AW-1:0] raddr,
  output logic [IW-1:0] rdata
);

  logic [IW-1:0] mem [ENTRIES];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata = mem[raddr];

endmodule
