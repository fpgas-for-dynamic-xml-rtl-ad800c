// tb_tag_matcher: string comparison of tag names against a stored predicate.
//
// A small reference RAM, read synchronously at rd_addr exactly like the
// shared tag RAM, holds the predicate. Opening tags are fed as cooked
// tokens and the hit output is checked at OpeningTagEnd / EmptyTagSlash
// against a plain string comparison, for exact names, prefixes, longer
// names and the '*' predicate, with random stalls.
module tb_tag_matcher;
  import xp_pkg::*;

  logic clk = 1'b0, rst = 1'b1, adv = 1'b0;
  cooked_t din;
  logic [7:0] rdata;
  logic [5:0] rd_addr;
  logic hit;
  logic [7:0] mem [64];
  int checks = 0, failures = 0, cycle = 0;

  tag_matcher #(.TAG_DEPTH(64)) u_dut (.clk, .rst, .adv, .din, .rdata, .rd_addr, .hit);

  always #5 clk = ~clk;
  always @(posedge clk) if (adv) rdata <= mem[rd_addr];
  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (cycle > 100000) begin
      failures++;
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  task automatic put(input token_e t, input byte c);
    while ($urandom_range(0, 4) == 0) begin
      din <= '{valid: 1'b0, tok: TK_NONE, ch: 8'h00}; adv <= 1'b0; @(posedge clk);
    end
    din <= '{valid: 1'b1, tok: t, ch: c}; adv <= 1'b1;
    @(posedge clk);
  endtask

  task automatic set_pred(input string p, input bit any);
    for (int i = 0; i < p.len(); i++) mem[i] = p[i];
    mem[p.len()] = PRED_END;
    if (any) mem[0] = PRED_ANY;
  endtask

  task automatic tag(input string name, input bit expect_hit, input bit empty);
    put(TK_TAGSTART, "<");
    for (int i = 0; i < name.len(); i++) put(TK_TAGNAMECHAR, name[i]);
    // check hit while the end token is presented
    while ($urandom_range(0, 4) == 0) begin
      din <= '{valid: 1'b0, tok: TK_NONE, ch: 8'h00}; adv <= 1'b0; @(posedge clk);
    end
    din <= '{valid: 1'b1, tok: empty ? TK_EMPTYTAGSLASH : TK_OPENINGTAGEND, ch: 8'h3e};
    adv <= 1'b1;
    @(negedge clk);
    checks++;
    if (hit !== expect_hit) begin
      failures++;
      $display("FAIL: tag <%s> hit=%0b expected %0b", name, hit, expect_hit);
    end
    @(posedge clk);
    put(TK_TEXT, "t");
  endtask

  initial begin
    din = '{valid: 1'b0, tok: TK_NONE, ch: 8'h00};
    set_pred("item", 0);
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    put(TK_TEXT, " ");
    tag("item", 1, 0);
    tag("ite", 0, 0);
    tag("items", 0, 0);
    tag("name", 0, 0);
    tag("item", 1, 1);
    tag("itex", 0, 0);
    set_pred("*", 1);
    tag("anything", 1, 0);
    tag("a", 1, 1);
    set_pred("incategory", 0);
    tag("incategory", 1, 0);
    tag("incategorx", 0, 0);
    tag("i", 0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
