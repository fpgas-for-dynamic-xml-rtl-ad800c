// tb_xml_parser: checks the token the parser attaches to every byte.
//
// Documents covering tags, text, attributes with a quoted '>', an
// empty-element tag, a comment, a closing tag with trailing blank and two
// <?query?> instructions (reset and a path using every axis, '*', node(),
// text() and '#') are fed with a randomly stalling adv. The expected token
// strings were written by hand, one letter per byte.
module tb_xml_parser;
  import xp_pkg::*;

  logic clk = 1'b0, rst = 1'b1, adv = 1'b0, in_valid = 1'b0;
  logic [7:0] in_data = 8'h00;
  cooked_t dout;
  int checks = 0, failures = 0, cycle = 0;

  xml_parser u_dut (.clk, .rst, .adv, .in_valid, .in_data, .dout);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (cycle > 100000) begin
      failures++;
      $display("FAIL: watchdog");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  function automatic byte code(token_e t);
    case (t)
      TK_TEXT: return "T";          TK_TAGSTART: return "S";
      TK_TAGNAMECHAR: return "N";   TK_OPENINGTAGEND: return "O";
      TK_CLOSINGTAGSLASH: return "C"; TK_CLOSINGTAGEND: return "E";
      TK_EMPTYTAGSLASH: return "s"; TK_EMPTYTAGEND: return "e";
      TK_ATTR: return "A";          TK_MISC: return "M";
      TK_CONFRESET: return "R";     TK_FNROOT: return "F";
      TK_PATHSLASH: return "P";     TK_AXISCHILD: return "c";
      TK_AXISDESC: return "d";      TK_AXISSELF: return "f";
      TK_AXISDOS: return "o";       TK_COLONCOLON: return "K";
      TK_NAMETESTCHAR: return "n";  TK_WILDCARD: return "W";
      TK_KINDNODE: return "k";      TK_KINDTEXT: return "t";
      TK_HASH: return "H";          TK_ENDOFPATH: return "Z";
      default: return "?";
    endcase
  endfunction

  function automatic string rep(byte c, int n);
    string s = "";
    for (int i = 0; i < n; i++) s = {s, string'(c)};
    return s;
  endfunction

  task automatic check_doc(input string doc, input string exp);
    string got = "";
    for (int i = 0; i < doc.len(); i++) begin
      // random stalls: the parser must hold while adv is low
      while ($urandom_range(0, 3) == 0) begin
        adv <= 1'b0; in_valid <= 1'b1; in_data <= doc[i];
        @(posedge clk);
      end
      adv <= 1'b1; in_valid <= 1'b1; in_data <= doc[i];
      @(posedge clk);
      adv <= 1'b0; in_valid <= 1'b0;
      @(negedge clk);
      if (!dout.valid || dout.ch != doc[i]) begin
        failures++;
        $display("FAIL: byte %0d of output is not the input byte", i);
      end
      got = {got, string'(code(dout.tok))};
    end
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s\n  got %s\n  exp %s", doc, got, exp);
    end else $display("ok   %s", doc);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    check_doc("<abc>xyz</abc>", "SNNNOTTTSCNNNE");
    check_doc("<p q=\"a>b\"/>", {"SN", rep("A", 8), "se"});
    check_doc("<?query reset?>", {"SM", rep("M", 5), "M", rep("M", 5), "RM"});
    check_doc("<?query fn:root()/descendant::ab/self::*/child::node()/descendant-or-self::text() #?>",
      {"SM", rep("M", 5), "M", "MM", "M", "MMMM", "F", "M", "P", rep("M", 10), "dK",
       "nn", "P", "MMMM", "fK", "W", "P", rep("M", 5), "cK", "nnnn", "k", "M", "P",
       rep("M", 18), "oK", "nnnn", "t", "M", "M", "H", "Z", "M"});
    check_doc("<!-- x>y -->t", {"S", rep("M", 11), "T"});
    check_doc("</q >", "SCNAE");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
