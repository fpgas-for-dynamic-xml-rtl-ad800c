// tb_config_logic: configuration tokens to workload registers.
//
// Feeds the token sequences of three segments' worth of path text and
// checks the axis flags, the fn:root() pulse, the predicate bytes written
// to a reference memory (including the zero terminator and the codes for
// '*' and text()), the configured baton, the end-of-chain-section flag, the
// '#' self-loop, that nothing is taken while conf_in is low, and that
// <?query reset?> clears everything.
module tb_config_logic;
  import xp_pkg::*;

  logic clk = 1'b0, rst = 1'b1, adv = 1'b0, conf_in = 1'b1;
  cooked_t din;
  logic configured, eoc, is_text, set_root, clear, we;
  axis_e axis;
  logic [5:0] waddr;
  logic [7:0] wdata;
  logic [7:0] mem [64];
  int checks = 0, failures = 0, cycle = 0, n_root = 0, n_writes = 0;

  config_logic #(.TAG_DEPTH(64)) u_dut (
    .clk, .rst, .adv, .din, .conf_in, .configured, .axis, .eoc, .is_text,
    .set_root, .clear, .we, .waddr, .wdata
  );

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (adv && we) begin mem[waddr] <= wdata; n_writes++; end
    if (adv && set_root) n_root++;
    if (cycle > 100000) begin
      failures++;
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  task automatic put(input token_e t, input byte c);
    din <= '{valid: 1'b1, tok: t, ch: c}; adv <= 1'b1;
    @(posedge clk);
    din <= '{valid: 1'b0, tok: TK_NONE, ch: 8'h00}; adv <= 1'b0;
    @(posedge clk);
  endtask

  task automatic name(input string s);
    for (int i = 0; i < s.len(); i++) put(TK_NAMETESTCHAR, s[i]);
  endtask

  task automatic expect1(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    din = '{valid: 1'b0, tok: TK_NONE, ch: 8'h00};
    for (int i = 0; i < 64; i++) mem[i] = 8'hff;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    // "fn:root()/descendant::"
    put(TK_FNROOT, "(");
    expect1(n_root == 1, "fn:root() pulse");
    put(TK_MISC, ")"); put(TK_PATHSLASH, "/");
    put(TK_AXISDESC, ":");
    expect1(axis == AX_DESC && !configured, "descendant axis taken");
    put(TK_COLONCOLON, ":");
    expect1(configured && !eoc, "configured after ::");
    // further tokens are ignored once configured
    name("zz"); put(TK_AXISSELF, ":");
    expect1(axis == AX_DESC && n_writes == 0, "ignored after configured");
    // reset, then "item/child::" with name written and terminated
    put(TK_CONFRESET, "?");
    expect1(!configured && axis == AX_CHILD && !eoc, "reset clears");
    conf_in = 1'b0;
    name("no"); put(TK_AXISDOS, ":");
    expect1(n_writes == 0 && axis == AX_CHILD, "conf_in low: nothing taken");
    conf_in = 1'b1;
    name("item"); put(TK_PATHSLASH, "/"); put(TK_AXISSELF, ":");
    expect1(mem[0] == "i" && mem[3] == "m" && mem[4] == PRED_END, "name and terminator written");
    expect1(axis == AX_SELF, "self axis");
    put(TK_COLONCOLON, ":");
    // "name #?" as the last step of a path
    put(TK_CONFRESET, "?");
    name("name"); put(TK_MISC, " "); put(TK_HASH, "#");
    expect1(axis == AX_DESC, "'#' gives the subtree loop");
    put(TK_ENDOFPATH, "?");
    expect1(configured && eoc && mem[4] == PRED_END, "end of path");
    // '*' and text()
    put(TK_CONFRESET, "?");
    put(TK_WILDCARD, "*"); put(TK_AXISCHILD, ":");
    expect1(mem[0] == PRED_ANY && mem[1] == PRED_END, "wildcard predicate");
    put(TK_CONFRESET, "?");
    name("text"); put(TK_KINDTEXT, "("); put(TK_MISC, ")"); put(TK_ENDOFPATH, "?");
    expect1(is_text && eoc && mem[0] == PRED_TEXT, "text() step");
    put(TK_CONFRESET, "?");
    expect1(!is_text && !eoc && !configured, "reset clears text/eoc");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
