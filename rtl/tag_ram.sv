// tag_ram: tag predicate memory shared by SHARE segment matchers.
//
// One block RAM holds the tag predicates of a group of SHARE neighbouring
// segment matchers side by side: word i holds character i of every
// matcher's predicate, one byte lane per matcher. All matchers need the same
// character position at the same byte of the stream (they only see it one
// cycle apart), so a single wide read per cycle serves the whole group.
// With the default of three lanes a word is 24 bits and the 512-word depth
// corresponds to one 18 kbit block in its 512 x 36 shape.
// The engine shares one block between neighbouring matchers; the byte-lane
// layout is this design's way of doing so. This design gives configuration
// writes their own port (one write, one read port), whereas the engine's
// description speaks of a single interface per block; the separate port
// keeps writes at the end of a query from colliding with the read-ahead of
// the next tag.
//
// Timing: synchronous read, rdata <= mem[raddr] on a clock edge with re;
// write on a clock edge with we into lane wlane. Contents are undefined
// until written; a matcher only reads positions its configuration wrote.
module tag_ram #(
  parameter int unsigned SHARE     = 3,
  parameter int unsigned TAG_DEPTH = 512
) (
  input  logic                         clk,
  input  logic                         re,
  input  logic [$clog2(TAG_DEPTH)-1:0] raddr,
  output logic [8*SHARE-1:0]           rdata,
  input  logic                         we,
  input  logic [$clog2(SHARE+1)-1:0]   wlane,
  input  logic [$clog2(TAG_DEPTH)-1:0] waddr,
  input  logic [7:0]                   wdata
);

  logic [8*SHARE-1:0] mem [TAG_DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr][8*wlane +: 8] <= wdata;
    if (re) rdata <= mem[raddr];
  end

endmodule
