// config_logic: the distributed configuration logic of one segment matcher.
//
// The query workload reaches the engine inside the data stream as
// <?query ...?> processing instructions, which the parser turns into
// configuration tokens. Each segment matcher snoops the tokens passing by.
// Segments are allocated left to right: a segment listens only while its
// predecessor is configured (conf_in) and it is not yet configured itself.
// One segment takes one node test plus the axis that follows it:
//   axis tokens        -> the two axis flip-flops
//   name-test chars    -> written to the tag predicate RAM, zero-terminated
//   '*', node()        -> PRED_ANY at predicate position 0
//   text()             -> PRED_TEXT at position 0 and the is_text flag
//   fn:root()          -> set_root: the history starts with a 1
//   '#'                -> descendant self-loop, keeps the whole subtree
//   "::"               -> configured (baton passed to the right)
//   end of path '?'    -> configured and end-of-chain-section flag
//   <?query reset?>    -> unconfigure, clear flags and history
// The token-to-action table follows the engine's configuration algorithm;
// the zero terminator, the codes for '*', node() and text(), and the use of
// '#' as a self-loop on the last step are this design's encoding.
//
// Timing: all flags are registers updated on an advancing clock edge;
// set_root, clear and the RAM write (we/waddr/wdata) are combinational from
// the current byte and take effect on that same edge. The terminator is
// written on the first configuration byte after the name.
module config_logic
  import xp_pkg::*;
#(
  parameter int unsigned TAG_DEPTH = 512
) (
  input  logic                         clk,
  input  logic                         rst,
  input  logic                         adv,
  input  cooked_t                      din,
  input  logic                         conf_in,
  output logic                         configured,
  output axis_e                        axis,
  output logic                         eoc,
  output logic                         is_text,
  output logic                         set_root,
  output logic                         clear,
  output logic                         we,
  output logic [$clog2(TAG_DEPTH)-1:0] waddr,
  output logic [7:0]                   wdata
);

  localparam int AW = $clog2(TAG_DEPTH);

  logic [AW-1:0] cpos_q;
  logic          name_open_q;
  logic          active;
  logic          name_tok;

  assign active   = din.valid && conf_in && !configured;
  assign clear    = din.valid && (din.tok == TK_CONFRESET);
  assign set_root = active && (din.tok == TK_FNROOT);
  assign name_tok = (din.tok == TK_NAMETESTCHAR) || (din.tok == TK_WILDCARD) ||
                    (din.tok == TK_KINDNODE) || (din.tok == TK_KINDTEXT);

  always_comb begin
    we    = 1'b0;
    waddr = cpos_q;
    wdata = PRED_END;
    if (active && !clear) begin
      unique case (din.tok)
        TK_NAMETESTCHAR: begin we = 1'b1; wdata = din.ch; end
        TK_WILDCARD, TK_KINDNODE: begin we = 1'b1; waddr = '0; wdata = PRED_ANY; end
        TK_KINDTEXT: begin we = 1'b1; waddr = '0; wdata = PRED_TEXT; end
        default: if (name_open_q) we = 1'b1;  // zero terminator at cpos
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      configured  <= 1'b0;
      axis        <= AX_CHILD;
      eoc         <= 1'b0;
      is_text     <= 1'b0;
      cpos_q      <= '0;
      name_open_q <= 1'b0;
    end else if (adv) begin
      if (clear) begin
        configured  <= 1'b0;
        axis        <= AX_CHILD;
        eoc         <= 1'b0;
        is_text     <= 1'b0;
        cpos_q      <= '0;
        name_open_q <= 1'b0;
      end else if (active) begin
        if (!name_tok) name_open_q <= 1'b0;
        unique case (din.tok)
          TK_AXISCHILD: axis <= AX_CHILD;
          TK_AXISDESC:  axis <= AX_DESC;
          TK_AXISSELF:  axis <= AX_SELF;
          TK_AXISDOS:   axis <= AX_DOS;
          TK_HASH:      axis <= AX_DESC;
          TK_NAMETESTCHAR: begin
            name_open_q <= 1'b1;
            if (cpos_q != AW'(TAG_DEPTH - 1)) cpos_q <= cpos_q + 1'b1;
          end
          TK_WILDCARD: begin
            name_open_q <= 1'b1;
            cpos_q      <= AW'(1);
          end
          TK_KINDTEXT:  is_text <= 1'b1;
          TK_COLONCOLON: configured <= 1'b1;
          TK_ENDOFPATH: begin
            configured <= 1'b1;
            eoc        <= 1'b1;
          end
          default: ;
        endcase
      end
    end
  end

endmodule
