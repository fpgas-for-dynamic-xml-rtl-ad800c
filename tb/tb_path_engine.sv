// tb_path_engine: a chain of two 3-way groups (six segment matchers).
//
// Two projection paths are configured so that the second spans the group
// boundary, then a document is streamed. The bytes flagged by the engine's
// match output must be exactly the expected regions; the chain latency is
// N_SEG cycles; a third path that does not fit into the remaining matchers
// is dropped without disturbing the configured ones; and after
// <?query reset?> the chain is allocated again from the left.
module tb_path_engine;
  import xp_pkg::*;

  localparam int N_SEG = 6;

  logic clk = 1'b0, rst = 1'b1, adv = 1'b1;
  logic p_valid = 1'b0;
  logic [7:0] p_data = 8'h00;
  cooked_t cooked, dout;
  logic match;
  string g_str;
  int checks = 0, failures = 0, cycle = 0, t_in, t_out;

  xml_parser u_src (.clk, .rst, .adv, .in_valid(p_valid), .in_data(p_data), .dout(cooked));

  path_engine #(.N_SEG(N_SEG), .SHARE(3), .TAG_DEPTH(32), .HIST_DEPTH(8)) u_dut (
    .clk, .rst, .adv, .din(cooked), .dout, .match
  );

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (!rst && dout.valid && match) g_str = {g_str, string'(dout.ch)};
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
      // random gaps in the input stream
      if ($urandom_range(0, 5) == 0) begin
        @(posedge clk); p_valid <= 1'b0;
      end
      @(posedge clk);
    end
    p_valid <= 1'b0;
    repeat (N_SEG + 3) @(posedge clk);
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
    parse({"<?query fn:root()/child::ab/child::cd?>",
           "<?query fn:root()/descendant::q #?>",
           "<?query fn:root()/child::zz?>"});
    g_str = "";
    parse("<ab><cd>X</cd><q>W<z>V</z></q></ab><zz>no</zz>");
    expect_str(g_str, "X</cd>W<z>V</z></q>", "two paths across a group boundary");
    g_str = "";
    p_valid <= 1'b1; p_data <= "@"; @(posedge clk); p_valid <= 1'b0;
    repeat (N_SEG + 3) @(posedge clk);
    checks++;
    if (t_out - t_in != N_SEG) begin
      failures++; $display("FAIL: chain latency %0d, expected %0d", t_out - t_in, N_SEG);
    end
    parse("<?query reset?><?query fn:root()/child::zz?>");
    g_str = "";
    parse("<ab><cd>X</cd></ab><zz>yes</zz>");
    expect_str(g_str, "yes</zz>", "reallocated after reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
