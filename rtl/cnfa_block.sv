// cnfa_block: the configurable NFA gates of one segment plus its history unit.
//
// The history unit is a shift register of single-bit match states, one per
// open element level; bit 0 is the current state. When an opening tag is
// complete (OpeningTagEnd, or EmptyTagSlash of "<x/>") a new state
//     match = (tag_hit and match_in) or (loop and current state)
// is shifted in; when an element closes (ClosingTagEnd, EmptyTagEnd) the
// register shifts back and the parent level's state reappears. loop is set
// for the descendant and descendant-or-self axes and realises the
// "any symbol" self-loop of the automaton state. set_root loads a single 1
// as the document-level state, which is how fn:root() matches exactly at the
// root level; clear empties the history on reconfiguration.
// This follows the engine's NFA algorithm; the depth of the history
// (HIST_DEPTH open levels; deeper levels lose their oldest state) is this
// design's choice.
//
// Timing: state is hist[0] as registered, i.e. the state after the last
// processed byte; the update happens on a clock edge with adv and a valid
// push/pop token on din.
module cnfa_block
  import xp_pkg::*;
#(
  parameter int unsigned HIST_DEPTH = 32
) (
  input  logic    clk,
  input  logic    rst,
  input  logic    adv,
  input  cooked_t din,
  input  logic    tag_hit,
  input  logic    match_in,
  input  logic    loop,
  input  logic    set_root,
  input  logic    clear,
  output logic    state
);

  logic [HIST_DEPTH-1:0] hist_q;
  logic                  next_match;

  assign next_match = (tag_hit && match_in) || (loop && hist_q[0]);
  assign state      = hist_q[0];

  always_ff @(posedge clk) begin
    if (rst) begin
      hist_q <= '0;
    end else if (adv) begin
      if (clear) hist_q <= '0;
      else if (set_root) hist_q <= HIST_DEPTH'(1);
      else if (din.valid && tok_push(din.tok))
        hist_q <= {hist_q[HIST_DEPTH-2:0], next_match};
      else if (din.valid && tok_pop(din.tok))
        hist_q <= {1'b0, hist_q[HIST_DEPTH-1:1]};
    end
  end

endmodule
