// xml_parser: turns a raw XML byte stream into a cooked stream.
//
// Every input byte leaves the parser, one cycle later, with a token that
// names its lexical role, so that all later units can work byte-serially
// without parsing XML themselves. The tokens for elements and text follow
// the engine's parser timing diagram; e.g. "<abc>xyz</abc>" becomes
// TagStart, 3x TagNameChar, OpeningTagEnd, 3x Text, TagStart,
// ClosingTagSlash, 3x TagNameChar, ClosingTagEnd.
//
// The parser also recognises <?query ...?> processing instructions, the way
// the engine receives its query workload inside the data stream, and marks
// the parts of a projection path with configuration tokens (axis names,
// "::", name-test characters, fn:root(), '#', end of path, reset).
// Axis tokens sit on the first ':' of "::" because only there the axis name
// is complete; an 18-byte window of the last word is compared with the
// keywords.
//
// This is a small hand-written lexer, not a validating parser: it handles
// elements, attributes with quoted values, empty-element tags, processing
// instructions, comments and other <!...> declarations (no DTD internals,
// CDATA sections or namespaces). Malformed input is passed through with
// best-effort tokens.
//
// Interface: a byte is taken when in_valid and adv are high; dout holds the
// cooked byte from the next cycle on. adv low freezes the parser and its
// output register (global stall of the engine).
module xml_parser
  import xp_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       adv,
  input  logic       in_valid,
  input  logic [7:0] in_data,
  output cooked_t    dout
);

  typedef enum logic [3:0] {
    S_TEXT, S_LT, S_OPEN_NAME, S_IN_TAG, S_ATTR_DQ, S_ATTR_SQ, S_EMPTY,
    S_CLOSE_NAME, S_CLOSE_TAIL, S_PI_TARGET, S_PI_BODY, S_PI_QM,
    S_QUERY, S_QUERY_QM, S_DECL, S_COMMENT
  } state_e;

  localparam int WORD_BYTES = 18;  // length of "descendant-or-self"

  state_e state_q, state_d;
  logic [8*WORD_BYTES-1:0] word_q, word_d;   // last word, right-aligned
  logic       test_q, test_d;      // query lexer expects a node test (after "::")
  logic       colon_q, colon_d;    // first ':' of "::" seen
  logic [1:0] decl_q, decl_d;      // counts leading '-' of "<!--"
  logic [1:0] dash_q, dash_d;      // trailing '-' count inside a comment
  token_e     tok;

  function automatic logic is_ws(logic [7:0] c);
    return (c == 8'h20) || (c == 8'h09) || (c == 8'h0a) || (c == 8'h0d);
  endfunction

  function automatic logic [8*WORD_BYTES-1:0] kw(string s);
    logic [8*WORD_BYTES-1:0] v;
    v = '0;
    for (int i = 0; i < s.len(); i++) v = {v[8*WORD_BYTES-9:0], s[i]};
    return v;
  endfunction

  logic [8*WORD_BYTES-1:0] word_app;
  assign word_app = {word_q[8*WORD_BYTES-9:0], in_data};

  always_comb begin
    state_d = state_q;
    word_d  = word_q;
    test_d  = test_q;
    colon_d = colon_q;
    decl_d  = decl_q;
    dash_d  = dash_q;
    tok     = TK_TEXT;
    unique case (state_q)
      S_TEXT: begin
        if (in_data == "<") begin tok = TK_TAGSTART; state_d = S_LT; end
        else tok = TK_TEXT;
      end
      S_LT: begin
        if (in_data == "/") begin tok = TK_CLOSINGTAGSLASH; state_d = S_CLOSE_NAME; end
        else if (in_data == "?") begin tok = TK_MISC; state_d = S_PI_TARGET; word_d = '0; end
        else if (in_data == "!") begin tok = TK_MISC; state_d = S_DECL; decl_d = 2'd0; end
        else begin tok = TK_TAGNAMECHAR; state_d = S_OPEN_NAME; end
      end
      S_OPEN_NAME: begin
        if (in_data == ">") begin tok = TK_OPENINGTAGEND; state_d = S_TEXT; end
        else if (in_data == "/") begin tok = TK_EMPTYTAGSLASH; state_d = S_EMPTY; end
        else if (is_ws(in_data)) begin tok = TK_ATTR; state_d = S_IN_TAG; end
        else tok = TK_TAGNAMECHAR;
      end
      S_IN_TAG: begin
        tok = TK_ATTR;
        if (in_data == ">") begin tok = TK_OPENINGTAGEND; state_d = S_TEXT; end
        else if (in_data == "/") begin tok = TK_EMPTYTAGSLASH; state_d = S_EMPTY; end
        else if (in_data == "\"") state_d = S_ATTR_DQ;
        else if (in_data == "'") state_d = S_ATTR_SQ;
      end
      S_ATTR_DQ: begin
        tok = TK_ATTR;
        if (in_data == "\"") state_d = S_IN_TAG;
      end
      S_ATTR_SQ: begin
        tok = TK_ATTR;
        if (in_data == "'") state_d = S_IN_TAG;
      end
      S_EMPTY: begin
        if (in_data == ">") begin tok = TK_EMPTYTAGEND; state_d = S_TEXT; end
        else tok = TK_ATTR;
      end
      S_CLOSE_NAME: begin
        if (in_data == ">") begin tok = TK_CLOSINGTAGEND; state_d = S_TEXT; end
        else if (is_ws(in_data)) begin tok = TK_ATTR; state_d = S_CLOSE_TAIL; end
        else tok = TK_TAGNAMECHAR;
      end
      S_CLOSE_TAIL: begin
        if (in_data == ">") begin tok = TK_CLOSINGTAGEND; state_d = S_TEXT; end
        else tok = TK_ATTR;
      end
      S_PI_TARGET: begin
        tok = TK_MISC;
        if (in_data == "?") state_d = S_PI_QM;
        else if (is_ws(in_data)) begin
          if (word_q == kw("query")) begin
            state_d = S_QUERY; test_d = 1'b0; colon_d = 1'b0;
          end else state_d = S_PI_BODY;
          word_d = '0;
        end else word_d = word_app;
      end
      S_PI_BODY: begin
        tok = TK_MISC;
        if (in_data == "?") state_d = S_PI_QM;
      end
      S_PI_QM: begin
        tok = TK_MISC;
        if (in_data == ">") state_d = S_TEXT;
        else if (in_data != "?") state_d = S_PI_BODY;
      end
      S_QUERY: begin
        tok = TK_MISC;
        if (in_data == "?") begin
          tok = (word_q == kw("reset")) ? TK_CONFRESET : TK_ENDOFPATH;
          state_d = S_QUERY_QM; word_d = '0;
        end else if (is_ws(in_data)) begin
          word_d = '0;
        end else if (in_data == "/") begin
          tok = TK_PATHSLASH; test_d = 1'b0; word_d = '0;
        end else if (in_data == ":") begin
          if (colon_q) begin
            tok = TK_COLONCOLON; colon_d = 1'b0; test_d = 1'b1; word_d = '0;
          end else if (word_q == kw("fn")) begin
            word_d = word_app;
          end else begin
            colon_d = 1'b1;
            if      (word_q == kw("child"))              tok = TK_AXISCHILD;
            else if (word_q == kw("descendant"))         tok = TK_AXISDESC;
            else if (word_q == kw("self"))               tok = TK_AXISSELF;
            else if (word_q == kw("descendant-or-self")) tok = TK_AXISDOS;
          end
        end else if (in_data == "(") begin
          if (word_q == kw("fn:root"))              tok = TK_FNROOT;
          else if (test_q && word_q == kw("node"))  tok = TK_KINDNODE;
          else if (test_q && word_q == kw("text"))  tok = TK_KINDTEXT;
          word_d = '0;
        end else if (in_data == ")") begin
          tok = TK_MISC;
        end else if (in_data == "*") begin
          tok = test_q ? TK_WILDCARD : TK_MISC;
        end else if (in_data == "#") begin
          tok = TK_HASH;
        end else begin
          tok = test_q ? TK_NAMETESTCHAR : TK_MISC;
          word_d = word_app;
        end
      end
      S_QUERY_QM: begin
        tok = TK_MISC;
        state_d = (in_data == ">") ? S_TEXT : S_QUERY;
      end
      S_DECL: begin
        tok = TK_MISC;
        if (decl_q != 2'd3 && in_data == "-") begin
          decl_d = decl_q + 2'd1;
          if (decl_q == 2'd1) begin state_d = S_COMMENT; dash_d = 2'd0; end
        end else begin
          decl_d = 2'd3;  // no comment: plain declaration up to '>'
          if (in_data == ">") state_d = S_TEXT;
        end
      end
      S_COMMENT: begin
        tok = TK_MISC;
        if (in_data == "-") dash_d = (dash_q == 2'd2) ? 2'd2 : dash_q + 2'd1;
        else if (in_data == ">" && dash_q == 2'd2) state_d = S_TEXT;
        else dash_d = 2'd0;
      end
      default: state_d = S_TEXT;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state_q <= S_TEXT;
      word_q  <= '0;
      test_q  <= 1'b0;
      colon_q <= 1'b0;
      decl_q  <= 2'd0;
      dash_q  <= 2'd0;
      dout    <= '{valid: 1'b0, tok: TK_NONE, ch: 8'h00};
    end else if (adv) begin
      dout.valid <= in_valid;
      dout.tok   <= in_valid ? tok : TK_NONE;
      dout.ch    <= in_data;
      if (in_valid) begin
        state_q <= state_d;
        word_q  <= word_d;
        test_q  <= test_d;
        colon_q <= colon_d;
        decl_q  <= decl_d;
        dash_q  <= dash_d;
      end
    end
  end

endmodule
