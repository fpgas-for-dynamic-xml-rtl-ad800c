// tag_matcher: compares the tag name in the cooked stream with the segment
// matcher's tag predicate.
//
// The predicate lives in RAM, one character per address, terminated by a
// zero byte; a predicate whose first byte is PRED_ANY stands for '*' or
// node() and matches every element. As the characters of a tag name stream
// past, the matcher compares each one with the predicate character at the
// same position and keeps a running "still equal" flag; at the end of an
// opening tag the name matches when all characters were equal and the
// predicate ends exactly there. This string comparison inside each segment
// matcher (instead of a central tag decoder) is the engine's scheme; the
// character-serial compare with a one-cycle read-ahead is this design's
// choice.
//
// Timing: rd_addr is the position the next byte will need. The RAM is read
// synchronously on every advancing clock edge, so rdata always holds the
// predicate character for the current position pos_q. hit is combinational
// and meaningful while din carries OpeningTagEnd or EmptyTagSlash.
module tag_matcher
  import xp_pkg::*;
#(
  parameter int unsigned TAG_DEPTH = 512
) (
  input  logic                         clk,
  input  logic                         rst,
  input  logic                         adv,
  input  cooked_t                      din,
  input  logic [7:0]                   rdata,
  output logic [$clog2(TAG_DEPTH)-1:0] rd_addr,
  output logic                         hit
);

  localparam int AW = $clog2(TAG_DEPTH);

  logic [AW-1:0] pos_q;
  logic          ok_q;     // all characters so far equal the predicate
  logic          wild_q;   // predicate is '*' / node()
  logic          at_max;

  assign at_max = (pos_q == AW'(TAG_DEPTH - 1));

  always_comb begin
    rd_addr = pos_q;
    if (din.valid) begin
      if (din.tok == TK_TAGSTART) rd_addr = '0;
      else if (din.tok == TK_TAGNAMECHAR && !at_max) rd_addr = pos_q + 1'b1;
    end
  end

  assign hit = wild_q || (ok_q && rdata == PRED_END);

  always_ff @(posedge clk) begin
    if (rst) begin
      pos_q  <= '0;
      ok_q   <= 1'b0;
      wild_q <= 1'b0;
    end else if (adv && din.valid) begin
      pos_q <= rd_addr;
      if (din.tok == TK_TAGSTART) begin
        ok_q   <= 1'b1;
        wild_q <= 1'b0;
      end else if (din.tok == TK_TAGNAMECHAR) begin
        if (pos_q == '0) wild_q <= (rdata == PRED_ANY);
        ok_q <= ok_q && !at_max && (rdata == din.ch);
      end
    end
  end

endmodule
