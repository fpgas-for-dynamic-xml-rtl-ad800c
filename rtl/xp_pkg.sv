// xp_pkg: types and constants shared by the XML projection engine.
//
// The engine works on a "cooked" XML stream: every raw input byte travels
// together with a token that names its lexical role (a tag name character,
// the '>' that closes an opening tag, a character of text, ...). The token
// names for ordinary XML follow the timing diagram of the parser (TagStart,
// TagNameChar, OpeningTagEnd, Text, ClosingTagSlash, ClosingTagEnd). The
// tokens for empty-element tags, attribute bytes and the configuration
// language inside <?query ...?> processing instructions are this design's
// own encoding; the configuration token names that the configuration logic
// reacts to (CONFRESET, AXISCHILD, NAMETESTCHAR, FNROOT, ENDOFPATH,
// COLONCOLON) follow the configuration algorithm of the engine.
package xp_pkg;

  typedef enum logic [4:0] {
    TK_NONE          = 5'd0,   // no meaning (never carried by a valid byte)
    TK_TEXT          = 5'd1,   // character data between tags
    TK_TAGSTART      = 5'd2,   // '<' of any markup
    TK_TAGNAMECHAR   = 5'd3,   // a character of an opening or closing tag name
    TK_OPENINGTAGEND = 5'd4,   // '>' that ends an opening tag
    TK_CLOSINGTAGSLASH = 5'd5, // '/' of "</"
    TK_CLOSINGTAGEND = 5'd6,   // '>' that ends a closing tag
    TK_EMPTYTAGSLASH = 5'd7,   // '/' of "/>" (element opens here)
    TK_EMPTYTAGEND   = 5'd8,   // '>' of "/>" (element closes here)
    TK_ATTR          = 5'd9,   // any other byte inside a start or end tag
    TK_MISC          = 5'd10,  // bytes of PIs, comments and declarations
    TK_CONFRESET     = 5'd11,  // '?' ending <?query reset?>
    TK_FNROOT        = 5'd12,  // '(' of fn:root()
    TK_PATHSLASH     = 5'd13,  // '/' between two steps of a path
    TK_AXISCHILD     = 5'd14,  // first ':' of "child::"
    TK_AXISDESC      = 5'd15,  // first ':' of "descendant::"
    TK_AXISSELF      = 5'd16,  // first ':' of "self::"
    TK_AXISDOS       = 5'd17,  // first ':' of "descendant-or-self::"
    TK_COLONCOLON    = 5'd18,  // second ':' of "::"
    TK_NAMETESTCHAR  = 5'd19,  // a character of a name test
    TK_WILDCARD      = 5'd20,  // '*' name test
    TK_KINDNODE      = 5'd21,  // '(' of node()
    TK_KINDTEXT      = 5'd22,  // '(' of text()
    TK_HASH          = 5'd23,  // '#': keep the whole subtree
    TK_ENDOFPATH     = 5'd24   // '?' ending a <?query path?>
  } token_e;

  // One byte of the cooked XML stream.
  typedef struct packed {
    logic       valid;
    token_e     tok;
    logic [7:0] ch;
  } cooked_t;

  // XPath axis held in two configuration flip-flops per segment matcher.
  typedef enum logic [1:0] {
    AX_CHILD = 2'd0,
    AX_DESC  = 2'd1,
    AX_SELF  = 2'd2,
    AX_DOS   = 2'd3
  } axis_e;

  // Tag predicate codes stored at position 0 of a predicate instead of a name.
  localparam logic [7:0] PRED_END  = 8'h00;  // terminates a stored name
  localparam logic [7:0] PRED_ANY  = 8'h01;  // '*' or node(): any element
  localparam logic [7:0] PRED_TEXT = 8'h02;  // text(): matches no element

  // An axis that carries the descendant self-loop.
  function automatic logic axis_loop(axis_e a);
    return (a == AX_DESC) || (a == AX_DOS);
  endfunction

  // An axis whose successor is evaluated on the same element (fast-forward).
  function automatic logic axis_self(axis_e a);
    return (a == AX_SELF) || (a == AX_DOS);
  endfunction

  // Tokens on which a new element level is entered / left.
  function automatic logic tok_push(token_e t);
    return (t == TK_OPENINGTAGEND) || (t == TK_EMPTYTAGSLASH);
  endfunction

  function automatic logic tok_pop(token_e t);
    return (t == TK_CLOSINGTAGEND) || (t == TK_EMPTYTAGEND);
  endfunction

endpackage
