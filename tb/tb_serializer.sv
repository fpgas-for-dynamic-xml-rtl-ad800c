// tb_serializer: re-creation of ancestor and closing tags around matched
// bytes.
//
// A parser cooks each document and the testbench supplies the match flag
// per byte from a hand-written mask (as the path engine would). The output,
// taken with a randomly stalling out_ready, is compared with the expected
// well-formed projection: ancestors printed before the first matched byte,
// raw copy of matched tags with their attributes, closing tags printed for
// re-created elements, and an empty-element tag that matches on its own.
module tb_serializer;
  import xp_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  logic p_valid = 1'b0;
  logic [7:0] p_data = 8'h00;
  cooked_t cooked;
  logic match, in_ready, out_valid, out_ready = 1'b1;
  logic [7:0] out_data;
  string out_str;
  bit   mbits [256];
  int idx, checks = 0, failures = 0, cycle = 0, n_prints = 0;

  xml_parser u_src (.clk, .rst, .adv(in_ready), .in_valid(p_valid), .in_data(p_data), .dout(cooked));

  serializer #(.TAGMEM_DEPTH(64), .STACK_DEPTH(8)) u_dut (
    .clk, .rst, .din(cooked), .match, .in_ready, .out_valid, .out_data, .out_ready
  );

  assign match = mbits[idx[7:0]];

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cycle <= cycle + 1;
    out_ready <= $urandom_range(0, 2) != 0;
    if (!rst && cooked.valid && in_ready) idx <= idx + 1;
    if (!rst && out_valid && out_ready) out_str = {out_str, string'(out_data)};
    if (!rst && int'(u_dut.ps_q) != 0) n_prints++;
    if (cycle > 100000) begin
      failures++;
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  task automatic run(input string doc, input string m, input string exp, input string what);
    foreach (mbits[i]) mbits[i] = (i < m.len()) && (m[i] == "1");
    out_str = ""; idx = 0;
    for (int i = 0; i < doc.len(); i++) begin
      p_valid <= 1'b1; p_data <= doc[i];
      @(posedge clk);
      while (!in_ready) @(posedge clk);
    end
    p_valid <= 1'b0;
    repeat (60) @(posedge clk);
    checks++;
    if (out_str != exp) begin
      failures++;
      $display("FAIL %s: got \"%s\" expected \"%s\"", what, out_str, exp);
    end else $display("ok   %s", what);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    run("<a><b>xy</b><c>z</c></a>", "000000000000000100000000",
        "<a><c>z</c></a>", "ancestors and closing tags re-created");
    run("<a><b>xy</b><c>z</c></a>", "000000111111000000000000",
        "<a><b>xy</b></a>", "matched closing tag copied");
    run("<a><e k='1'/>t</a>", "000000000000100000",
        "<a><e></e></a>", "empty element matched on its own");
    run("<a><e k='1'/>t</a>", "000111111111100000",
        "<a><e k='1'/></a>", "empty element copied with attributes");
    run("<r><s><t>deep</t></s></r>", "0000000001111111111111111",
        "<r><s><t>deep</t></s></r>", "three levels re-created, then copied");
    checks++;
    if (n_prints == 0) begin failures++; $display("FAIL: never printed from tag RAM"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
