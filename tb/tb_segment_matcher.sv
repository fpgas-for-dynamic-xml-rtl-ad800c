// tb_segment_matcher: one segment matcher, configured from tokens and run
// on a parsed document.
//
// The segment gets its predicate RAM from a reference array read exactly
// like the shared tag RAM. Checks: the cooked byte and conf flag leave one
// cycle later; as the last step of a path (name x, end of path) the global
// flag is high exactly for bytes inside <x> elements whose parent level had
// match_in; with a self axis match_out is the fast-forwarded live state
// (high already on the '>' that opened the element); with a child axis it
// is the registered state before the byte; global_in is passed through.
module tb_segment_matcher;
  import xp_pkg::*;

  logic clk = 1'b0, rst = 1'b1, adv = 1'b1;
  cooked_t tdin, din, pdout, dout;
  logic use_parser = 1'b0, p_valid = 1'b0;
  logic [7:0] p_data = 8'h00;
  logic match_in = 1'b0, global_in = 1'b0, conf_in = 1'b1;
  logic match_out, global_out, conf_out, we;
  logic [5:0] rd_addr, waddr;
  logic [7:0] rdata, wdata;
  logic [7:0] mem [64];
  cooked_t prev;
  string g_str, m_str;
  int checks = 0, failures = 0, cycle = 0;

  xml_parser u_src (.clk, .rst, .adv, .in_valid(p_valid), .in_data(p_data), .dout(pdout));
  assign din = use_parser ? pdout : tdin;

  segment_matcher #(.TAG_DEPTH(64), .HIST_DEPTH(8)) u_dut (
    .clk, .rst, .adv, .din, .match_in, .global_in, .conf_in,
    .dout, .match_out, .global_out, .conf_out, .rd_addr, .rdata, .we, .waddr, .wdata
  );

  always #5 clk = ~clk;
  always @(posedge clk) begin
    if (adv) rdata <= mem[rd_addr];
    if (adv && we) mem[waddr] <= wdata;
    cycle <= cycle + 1;
    if (cycle > 100000) begin
      failures++;
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  // output monitor: one-cycle delay of the stream, collected flags
  always @(posedge clk) begin
    prev <= din;
    if (!rst && dout.valid) begin
      if (global_out) g_str = {g_str, string'(dout.ch)};
      if (match_out)  m_str = {m_str, string'(dout.ch)};
    end
    if (!rst && cycle > 4) begin
      checks++;
      if (dout != prev) begin failures++; $display("FAIL: dout is not din delayed"); end
    end
  end

  task automatic put(input token_e t, input byte c);
    tdin <= '{valid: 1'b1, tok: t, ch: c};
    @(posedge clk);
    tdin <= '{valid: 1'b0, tok: TK_NONE, ch: 8'h00};
  endtask

  task automatic parse(input string s);
    use_parser <= 1'b1;
    for (int i = 0; i < s.len(); i++) begin
      p_valid <= 1'b1; p_data <= s[i];
      @(posedge clk);
    end
    p_valid <= 1'b0;
    repeat (3) @(posedge clk);
    use_parser <= 1'b0;
  endtask

  task automatic expect_str(input string got, input string exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got \"%s\" expected \"%s\"", what, got, exp);
    end else $display("ok   %s", what);
  endtask

  initial begin
    tdin = '{valid: 1'b0, tok: TK_NONE, ch: 8'h00};
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    // last step "x" of a path
    put(TK_NAMETESTCHAR, "x"); put(TK_ENDOFPATH, "?");
    @(posedge clk); #1;
    checks++;
    if (!conf_out) begin failures++; $display("FAIL: conf_out after end of path"); end
    g_str = ""; m_str = "";
    match_in <= 1'b1;
    parse("<x>t<x>u</x></x><y>v</y>");
    expect_str(g_str, "t<x>u</x></x>", "end-of-section merge, child level");
    expect_str(m_str, "", "match_out low at end of section");
    match_in <= 1'b0; g_str = "";
    parse("<x>t</x>");
    expect_str(g_str, "", "no match without match_in");
    // global_in passes through
    global_in <= 1'b1; g_str = "";
    parse("ab");
    expect_str(g_str, "ab", "global_in passed on");
    global_in <= 1'b0;
    // self axis: x/self::..., fast-forward of the live state
    put(TK_CONFRESET, "?");
    put(TK_NAMETESTCHAR, "x"); put(TK_PATHSLASH, "/"); put(TK_AXISSELF, ":"); put(TK_COLONCOLON, ":");
    match_in <= 1'b1; m_str = ""; g_str = "";
    parse("<x>t</x>");
    expect_str(m_str, ">t</x", "self axis: live state forwarded");
    expect_str(g_str, "", "no global flag without end of section");
    // child axis: registered state before the byte
    put(TK_CONFRESET, "?");
    put(TK_NAMETESTCHAR, "x"); put(TK_PATHSLASH, "/"); put(TK_AXISCHILD, ":"); put(TK_COLONCOLON, ":");
    m_str = "";
    parse("<x>t</x>");
    expect_str(m_str, "t</x>", "child axis: state before the byte");
    // descendant axis: self-loop keeps deeper levels
    put(TK_CONFRESET, "?");
    put(TK_NAMETESTCHAR, "x"); put(TK_PATHSLASH, "/"); put(TK_AXISDESC, ":"); put(TK_COLONCOLON, ":");
    m_str = "";
    parse("<x><z>q</z></x>");
    expect_str(m_str, "<z>q</z></x>", "descendant axis loop");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
