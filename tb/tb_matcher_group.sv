// tb_matcher_group: three segment matchers sharing one tag RAM.
//
// A path of exactly three steps (fn:root()/child::ab/child::cd) is
// configured through the parser so that all three lanes of the shared RAM
// are written and read; the relayed lanes must deliver each matcher its own
// predicate at the right cycle. The bytes flagged by the group's merged
// match output are compared with the expected projection regions, and the
// group latency of SHARE cycles is checked. A second workload of two short
// paths ending inside the group checks match merging within one group.
module tb_matcher_group;
  import xp_pkg::*;

  localparam int SHARE = 3;

  logic clk = 1'b0, rst = 1'b1, adv = 1'b1;
  logic p_valid = 1'b0;
  logic [7:0] p_data = 8'h00;
  cooked_t cooked, dout;
  logic match_out, global_out, conf_out;
  string g_str;
  int checks = 0, failures = 0, cycle = 0, t_in, t_out;

  xml_parser u_src (.clk, .rst, .adv, .in_valid(p_valid), .in_data(p_data), .dout(cooked));

  matcher_group #(.SHARE(SHARE), .TAG_DEPTH(32), .HIST_DEPTH(8)) u_dut (
    .clk, .rst, .adv, .din(cooked), .match_in(1'b0), .global_in(1'b0), .conf_in(1'b1),
    .dout, .match_out, .global_out, .conf_out
  );

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (!rst && dout.valid && global_out) g_str = {g_str, string'(dout.ch)};
    if (!rst && cooked.valid && cooked.ch == "@") t_in = cycle;
    if (!rst && dout.valid && dout.ch == "@") t_out = cycle;
    if (cycle > 100000) begin
      failures++;
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  task automatic parse(input string s);
    for (int i = 0; i < s.len(); i++) begin
      p_valid <= 1'b1; p_data <= s[i];
      @(posedge clk);
    end
    p_valid <= 1'b0;
    repeat (SHARE + 3) @(posedge clk);
  endtask

  task automatic expect_str(input string got, input string exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got \"%s\" expected \"%s\"", what, got, exp);
    end else $display("ok   %s", what);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    parse("<?query fn:root()/child::ab/child::cd?>");
    checks++;
    if (!conf_out) begin failures++; $display("FAIL: group not configured"); end
    g_str = "";
    parse("<ab><cd>X</cd><ce>Y</ce><c>Z</c><cd/></ab><cd>W</cd>@");
    expect_str(g_str, "X</cd>>", "three-lane predicate matching");
    checks++;
    if (t_out - t_in != SHARE) begin
      failures++; $display("FAIL: group latency %0d", t_out - t_in);
    end
    parse("<?query reset?><?query fn:root()/child::q?><?query fn:root()?>");
    g_str = "";
    parse("<q>1</q><r>2</r>");
    // fn:root() alone flags the bytes at document level (the tags of the
    // top-level elements), the first path the content of <q>
    expect_str(g_str, "<q>1</q><r>", "two sections merged in one group");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
