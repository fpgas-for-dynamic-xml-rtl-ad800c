// tb_xml_projection_full: the projection engine at its default size
// (600 segment matchers in 200 groups sharing 3-way tag RAMs).
//
// Configures the three projection paths of an auction-item query
// (//regions//item, its name subtree and its incategory children) through
// <?query?> instructions, streams an auction-style document and compares
// the complete output with the hand-derived projection. Then a long run of
// unmatched text checks one byte per cycle, and a marker byte inside a
// matched subtree checks the N_SEG + 1 cycle latency.
module tb_xml_projection_full;
  import xp_pkg::*;

  localparam int N_SEG = 600;

  logic clk = 1'b0;
  logic rst = 1'b1;
  logic in_valid, in_ready, out_valid, out_ready;
  logic [7:0] in_data, out_data;
  int checks = 0, failures = 0;
  int cycle = 0;
  string in_str, out_str;
  int in_idx, t_in_z, t_out_z, max_in_run, cur_in_run;

  xml_projection u_dut (
    .clk, .rst, .in_valid, .in_data, .in_ready, .out_valid, .out_data, .out_ready
  );

  always #5 clk = ~clk;

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (cycle > 100000) begin
      failures++;
      $display("FAIL: watchdog expired");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  assign in_valid  = !rst && (in_idx < in_str.len());
  assign in_data   = (in_idx < in_str.len()) ? in_str[in_idx] : 8'h00;
  assign out_ready = 1'b1;

  always @(posedge clk) begin
    if (!rst) begin
      if (in_valid && in_ready) begin
        if (in_data == "Z") t_in_z = cycle;
        in_idx <= in_idx + 1;
        cur_in_run = cur_in_run + 1;
        if (cur_in_run > max_in_run) max_in_run = cur_in_run;
      end else cur_in_run = 0;
      if (out_valid && out_ready) begin
        out_str = {out_str, string'(out_data)};
        if (out_data == "Z") t_out_z = cycle;
      end
    end
  end

  task automatic run(input string doc, input string exp, input string name);
    in_str  = doc;
    out_str = "";
    in_idx  = 0;
    while (in_idx < in_str.len()) @(posedge clk);
    repeat (N_SEG + 200) @(posedge clk);
    checks++;
    if (out_str != exp) begin
      failures++;
      $display("FAIL %s:\n  got %s\n  exp %s", name, out_str, exp);
    end else $display("ok   %s", name);
  endtask

  localparam string CONF = {
    "<?xml version=\"1.0\"?>\n<?query reset?>\n",
    "<?query fn:root()/descendant::regions/descendant::item?>\n",
    "<?query fn:root()/descendant::regions/descendant::item\n  /child::name #?>\n",
    "<?query fn:root()/descendant::regions/descendant::item\n  /child::incategory?>\n"};
  localparam string DOC = {
    "<site><regions><africa><item id=\"item42\"><location>Chad</location>",
    "<name>vapour wept became empty </name>",
    "<incategory category=\"category3\"/><incategory category=\"category1\"/>",
    "</item></africa><asia><item id=\"item7\"><name>x</name></item></asia></regions>",
    "<open_auctions><open_auction id=\"open_auction0\"><initial>3</initial>",
    "</open_auction></open_auctions></site>"};
  localparam string EXP = {
    "<site><regions><africa><item><location></location>",
    "<name>vapour wept became empty </name>",
    "<incategory category=\"category3\"/><incategory category=\"category1\"/>",
    "</item></africa><asia><item><name>x</name></item></asia></regions></site>"};

  initial begin
    string pad;
    in_str = ""; in_idx = 0; out_str = "";
    max_in_run = 0; cur_in_run = 0;
    repeat (4) @(posedge clk);
    rst = 1'b0;

    run({CONF, DOC}, EXP, "auction item paths at full size");

    pad = "";
    for (int i = 0; i < N_SEG + 100; i++) pad = {pad, "a"};
    max_in_run = 0;
    run({"<?query reset?><?query fn:root()/child::r/child::k #?><r>", pad,
         "<k>", pad, "Z</k></r>"},
        {"<r><k>", pad, "Z</k></r>"}, "throughput and latency at full size");
    checks++;
    if (max_in_run < N_SEG + 100) begin
      failures++;
      $display("FAIL: longest run of back-to-back input bytes %0d", max_in_run);
    end
    checks++;
    if (t_out_z - t_in_z != N_SEG + 1) begin
      failures++;
      $display("FAIL: latency %0d cycles, expected %0d", t_out_z - t_in_z, N_SEG + 1);
    end else $display("ok   latency %0d cycles", t_out_z - t_in_z);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
