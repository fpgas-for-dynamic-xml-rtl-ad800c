// segment_matcher: one runtime-configurable segment of the path-matching NFA.
//
// A segment stands for one step of a projection path: a node test and the
// axis that follows it. It combines a tag_matcher (node test against the
// predicate in the shared tag RAM), a cnfa_block (gates and history shift
// register) and config_logic (workload registers, written from the stream).
// Chained segment matchers form the automaton; the cooked stream and the
// match state travel from left to right through one pipeline register per
// segment, so no wire is longer than one neighbour hop.
//
// Signals between neighbours, all registered with the byte they belong to:
//   dout       the cooked byte, one cycle after din
//   match_out  this segment's state before dout was processed (child and
//              descendant axes), or its live state after dout was processed
//              (self and descendant-or-self: the "fast-forward" that lets
//              the successor test the same element); forced low at the end
//              of a chain section so the next path starts fresh
//   global_out the merged match flag of all finished paths so far: at the
//              end of a chain section the local result is OR-ed in. For a
//              normal last step the local result is the state before the
//              byte; for a text() step it is match_in on text bytes.
//   conf_out   the configured flag before dout was processed (baton)
// The pipeline, fast-forward, match merging and baton follow the engine's
// description; the exact "state before the byte" alignment of the flags is
// this design's choice and is what the serializer relies on.
//
// Tag RAM port: rd_addr is the read-ahead address, rdata the character for
// the current position (supplied by the group); we/waddr/wdata write this
// segment's predicate. adv low stalls everything.
module segment_matcher
  import xp_pkg::*;
#(
  parameter int unsigned TAG_DEPTH  = 512,
  parameter int unsigned HIST_DEPTH = 32
) (
  input  logic                         clk,
  input  logic                         rst,
  input  logic                         adv,
  input  cooked_t                      din,
  input  logic                         match_in,
  input  logic                         global_in,
  input  logic                         conf_in,
  output cooked_t                      dout,
  output logic                         match_out,
  output logic                         global_out,
  output logic                         conf_out,
  output logic [$clog2(TAG_DEPTH)-1:0] rd_addr,
  input  logic [7:0]                   rdata,
  output logic                         we,
  output logic [$clog2(TAG_DEPTH)-1:0] waddr,
  output logic [7:0]                   wdata
);

  axis_e axis;
  logic  configured, eoc, is_text, set_root, clear;
  logic  tag_hit, state;
  logic  match_q, local_match;

  tag_matcher #(.TAG_DEPTH(TAG_DEPTH)) u_tag (
    .clk, .rst, .adv, .din, .rdata, .rd_addr, .hit(tag_hit)
  );

  config_logic #(.TAG_DEPTH(TAG_DEPTH)) u_conf (
    .clk, .rst, .adv, .din, .conf_in, .configured, .axis, .eoc, .is_text,
    .set_root, .clear, .we, .waddr, .wdata
  );

  cnfa_block #(.HIST_DEPTH(HIST_DEPTH)) u_cnfa (
    .clk, .rst, .adv, .din, .tag_hit, .match_in, .loop(axis_loop(axis)),
    .set_root, .clear, .state
  );

  assign local_match = is_text ? (din.tok == TK_TEXT && match_in) : state;

  always_ff @(posedge clk) begin
    if (rst) begin
      dout       <= '{valid: 1'b0, tok: TK_NONE, ch: 8'h00};
      match_q    <= 1'b0;
      global_out <= 1'b0;
      conf_out   <= 1'b0;
    end else if (adv) begin
      dout       <= din;
      match_q    <= state;
      global_out <= global_in || (din.valid && eoc && local_match);
      conf_out   <= configured;
    end
  end

  assign match_out = !eoc && (axis_self(axis) ? state : match_q);

endmodule
