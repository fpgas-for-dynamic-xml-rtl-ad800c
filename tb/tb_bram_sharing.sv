// tb_bram_sharing: the whole engine with and without tag-RAM sharing.
//
// The engine can give every segment matcher its own predicate RAM
// (SHARE = 1) or let two or three neighbours share one RAM, with the first
// matcher of a group driving the read address and the others receiving
// their byte lanes through relay registers. The projection result must not
// depend on this. Three engines of 12 segment matchers (SHARE = 1, 2 and 3,
// so 12, 6 and 4 RAMs) run side by side on the same input:
//   1. three //regions//item paths on an auction-style document. The 11
//      segments they take cross group boundaries differently in each engine;
//   2. <?query reset?>, then self / descendant-or-self / '*' / text() paths.
// Each engine's complete output is compared with a projection worked out by
// hand. Each engine is also checked for one byte per cycle on unmatched
// input and for the N_SEG+1 cycle latency of a copied byte (taken when no
// stall is in flight), which sharing must not change.
module tb_bram_sharing;
  import xp_pkg::*;

  localparam int N_SEG = 12;
  localparam int N_ENG = 3;

  logic clk = 1'b0;
  logic rst = 1'b1;
  int checks = 0, failures = 0;
  int cycle = 0;

  string in_str;
  string out_str [N_ENG];
  int    in_idx  [N_ENG];
  int    t_in_z  [N_ENG];
  int    t_out_z [N_ENG];
  int    run_len [N_ENG];
  int    max_run [N_ENG];

  logic [N_ENG-1:0] in_valid, in_ready, out_valid;
  logic [7:0]       in_data  [N_ENG];
  logic [7:0]       out_data [N_ENG];

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

  for (genvar e = 0; e < N_ENG; e++) begin : g_eng
    xml_projection #(.N_SEG(N_SEG), .SHARE(e + 1)) u_dut (
      .clk, .rst,
      .in_valid(in_valid[e]), .in_data(in_data[e]), .in_ready(in_ready[e]),
      .out_valid(out_valid[e]), .out_data(out_data[e]), .out_ready(1'b1)
    );

    assign in_valid[e] = !rst && (in_idx[e] < in_str.len());
    assign in_data[e]  = (in_idx[e] < in_str.len()) ? in_str[in_idx[e]] : 8'h00;

    always @(posedge clk) begin
      if (!rst) begin
        if (in_valid[e] && in_ready[e]) begin
          if (in_data[e] == "Z") t_in_z[e] = cycle;
          in_idx[e] <= in_idx[e] + 1;
          run_len[e] = run_len[e] + 1;
          if (run_len[e] > max_run[e]) max_run[e] = run_len[e];
        end else run_len[e] = 0;
        if (out_valid[e]) begin
          out_str[e] = {out_str[e], string'(out_data[e])};
          if (out_data[e] == "Z") t_out_z[e] = cycle;
        end
      end
    end
  end

  task automatic run(input string doc, input string exp, input string name);
    in_str = doc;
    for (int e = 0; e < N_ENG; e++) begin
      out_str[e] = "";
      in_idx[e]  = 0;
    end
    for (int e = 0; e < N_ENG; e++)
      while (in_idx[e] < in_str.len()) @(posedge clk);
    repeat (N_SEG * 4 + 200) @(posedge clk);
    for (int e = 0; e < N_ENG; e++) begin
      checks++;
      if (out_str[e] != exp) begin
        failures++;
        $display("FAIL %s, SHARE=%0d:\n  got %s\n  exp %s", name, e + 1, out_str[e], exp);
      end
    end
  endtask

  localparam string CONF1 = {
    "<?query reset?>",
    "<?query fn:root()/descendant::regions/descendant::item?>\n",
    "<?query fn:root()/descendant::regions/descendant::item/child::name #?>\n",
    "<?query fn:root()/descendant::regions/descendant::item/child::incategory?>\n"};
  localparam string DOC1 = {
    "<site><regions><africa><item id=\"item42\"><name>vapour <b>x</b></name>",
    "<incategory category=\"c3\"/><junk>zz</junk></item></africa></regions>",
    "<open_auctions><open_auction id=\"o0\">abc</open_auction></open_auctions></site>"};
  localparam string EXP1 = {
    "<site><regions><africa><item><name>vapour <b>x</b></name>",
    "<incategory category=\"c3\"/><junk></junk></item></africa></regions></site>"};

  localparam string CONF2 = {
    "<?query reset?><?query fn:root()/child::a/descendant-or-self::*/self::b?>",
    "<?query fn:root()/descendant::c/child::text()?>"};
  localparam string DOC2 =
    "<a><b>t1</b><x><b>t2<d/></b></x><c>hello<e>no</e>!</c></a>";
  localparam string EXP2 =
    "<a><b>t1</b><x><b>t2<d/></b></x><c>hello!</c></a>";

  initial begin
    string pad;
    in_str = "";
    for (int e = 0; e < N_ENG; e++) begin
      in_idx[e] = 0; out_str[e] = ""; run_len[e] = 0; max_run[e] = 0;
      t_in_z[e] = 0; t_out_z[e] = 0;
    end
    repeat (4) @(posedge clk);
    rst = 1'b0;

    run({CONF1, DOC1}, EXP1, "auction items");
    run({CONF2, DOC2}, EXP2, "self axes and text()");

    // rate and latency: long unmatched text, then matched text ending in
    // 'Z'; the re-creation of <r> has stalled the engine long before 'Z'
    pad = "";
    for (int i = 0; i < 64; i++) pad = {pad, "y"};
    for (int e = 0; e < N_ENG; e++) max_run[e] = 0;
    run({"<?query reset?><?query fn:root()/child::r?><s>", pad, "</s><r>", pad, "Z</r>"},
        {"<r>", pad, "Z</r>"}, "latency document");
    for (int e = 0; e < N_ENG; e++) begin
      checks++;
      if (max_run[e] < 64) begin
        failures++;
        $display("FAIL: SHARE=%0d longest input run %0d bytes, expected >= 64", e + 1, max_run[e]);
      end
      checks++;
      if (t_out_z[e] - t_in_z[e] != N_SEG + 1) begin
        failures++;
        $display("FAIL: SHARE=%0d latency %0d cycles, expected %0d",
                 e + 1, t_out_z[e] - t_in_z[e], N_SEG + 1);
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
