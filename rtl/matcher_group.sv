// matcher_group: SHARE chained segment matchers that share one tag RAM.
//
// Block RAMs are scarcer than logic, so neighbouring segment matchers share
// one block for their tag predicates. The first matcher of the group
// mediates: its read-ahead address drives the RAM, and the RAM word carries
// one predicate character per matcher. Lane 0 goes straight to the first
// matcher; lane k is passed on through k registers, because matcher k sees
// every byte k cycles after the first one and therefore needs the character
// at the same position k cycles later. Configuration writes of whichever
// matcher is being configured (only one at a time) go to its own lane.
// Sharing between neighbours with the first acting as mediator follows the
// engine's BRAM-sharing scheme; the delayed lanes are this design's way of
// serving all matchers with one read per cycle.
//
// Interface and timing are those of a chain of SHARE segment matchers:
// dout and the flags appear SHARE cycles after din.
module matcher_group
  import xp_pkg::*;
#(
  parameter int unsigned SHARE      = 3,
  parameter int unsigned TAG_DEPTH  = 512,
  parameter int unsigned HIST_DEPTH = 32
) (
  input  logic    clk,
  input  logic    rst,
  input  logic    adv,
  input  cooked_t din,
  input  logic    match_in,
  input  logic    global_in,
  input  logic    conf_in,
  output cooked_t dout,
  output logic    match_out,
  output logic    global_out,
  output logic    conf_out
);

  localparam int AW = $clog2(TAG_DEPTH);
  localparam int LW = $clog2(SHARE + 1);

  cooked_t          d     [SHARE+1];
  logic [SHARE:0]   m, g, c;
  logic [AW-1:0]    rd_addr [SHARE];
  logic [SHARE-1:0] seg_we;
  logic [AW-1:0]    seg_waddr [SHARE];
  logic [7:0]       seg_wdata [SHARE];
  logic [8*SHARE-1:0] word;
  logic [7:0]       lane [SHARE];   // character presented to matcher k

  logic          we;
  logic [LW-1:0] wlane;
  logic [AW-1:0] waddr;
  logic [7:0]    wdata;

  assign d[0] = din;
  assign m[0] = match_in;
  assign g[0] = global_in;
  assign c[0] = conf_in;

  always_comb begin
    we    = 1'b0;
    wlane = '0;
    waddr = '0;
    wdata = '0;
    for (int k = 0; k < SHARE; k++) begin
      if (seg_we[k]) begin
        we    = 1'b1;
        wlane = LW'(k);
        waddr = seg_waddr[k];
        wdata = seg_wdata[k];
      end
    end
  end

  tag_ram #(.SHARE(SHARE), .TAG_DEPTH(TAG_DEPTH)) u_ram (
    .clk, .re(adv), .raddr(rd_addr[0]), .rdata(word),
    .we, .wlane, .waddr, .wdata
  );

  assign lane[0] = word[7:0];

  for (genvar k = 1; k < SHARE; k++) begin : g_relay
    // lane k delayed by k cycles: a small shift register per lane
    logic [7:0] dly [k];
    always_ff @(posedge clk) begin
      if (adv) begin
        dly[0] <= word[8*k +: 8];
        for (int j = 1; j < k; j++) dly[j] <= dly[j-1];
      end
    end
    assign lane[k] = dly[k-1];
  end

  for (genvar k = 0; k < SHARE; k++) begin : g_seg
    segment_matcher #(.TAG_DEPTH(TAG_DEPTH), .HIST_DEPTH(HIST_DEPTH)) u_seg (
      .clk, .rst, .adv,
      .din(d[k]), .match_in(m[k]), .global_in(g[k]), .conf_in(c[k]),
      .dout(d[k+1]), .match_out(m[k+1]), .global_out(g[k+1]), .conf_out(c[k+1]),
      .rd_addr(rd_addr[k]), .rdata(lane[k]),
      .we(seg_we[k]), .waddr(seg_waddr[k]), .wdata(seg_wdata[k])
    );
  end

  assign dout       = d[SHARE];
  assign match_out  = m[SHARE];
  assign global_out = g[SHARE];
  assign conf_out   = c[SHARE];

endmodule
