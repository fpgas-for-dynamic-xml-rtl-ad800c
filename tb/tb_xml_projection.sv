// tb_xml_projection: end-to-end test of the projection engine at a reduced
// chain length (12 segment matchers in four 3-way groups).
//
// Each scenario feeds a document with its <?query?> workload through the
// engine and compares the complete output with a projection worked out by
// hand from the path semantics:
//   1. three paths of the form //regions//item[/name #|/incategory] on an
//      auction-style document: ancestor re-creation, '#' subtrees, raw copy
//      of child tags, empty-element tags, closing tags printed from the
//      tag RAM, three chain sections merged into one global flag;
//   2. <?query reset?>, then descendant-or-self and self axes
//      (fast-forward), a '*' wildcard and a text() step;
//   3. scenario 1 again with a randomly stalling output (backpressure);
//   4. throughput and latency: unmatched text streams at one byte per cycle
//      and a copied byte appears N_SEG+1 cycles after it was taken.
// Every mechanism is counted and must occur at least once.
module tb_xml_projection;
  import xp_pkg::*;

  localparam int N_SEG = 12;

  logic clk = 1'b0;
  logic rst = 1'b1;
  logic in_valid, in_ready, out_valid, out_ready;
  logic [7:0] in_data, out_data;
  int checks = 0, failures = 0;
  int cycle = 0;
  bit  rand_ready = 1'b0;

  string in_str, out_str;
  int    in_idx;
  int    t_in_z, t_out_z, max_in_run, cur_in_run;

  // mechanism counters
  int n_flush = 0, n_close = 0, n_stall = 0, n_bp = 0, n_reset = 0, n_path = 0;
  int n_empty = 0, n_text = 0, n_ff = 0;

  xml_projection #(.N_SEG(N_SEG)) u_dut (
    .clk, .rst, .in_valid, .in_data, .in_ready, .out_valid, .out_data, .out_ready
  );

  always #5 clk = ~clk;

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (cycle > 200000) begin
      failures++;
      $display("FAIL: watchdog expired");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  // driver and collector
  assign in_valid = !rst && (in_idx < in_str.len());
  assign in_data  = (in_idx < in_str.len()) ? in_str[in_idx] : 8'h00;

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
      if (in_valid && !in_ready) n_stall++;
      if (out_valid && !out_ready) n_bp++;
      if (u_dut.u_ser.ps_q == u_dut.u_ser.P_OPEN_LT && out_ready) n_flush++;
      if (u_dut.u_ser.ps_q == u_dut.u_ser.P_CLOSE_LT && out_ready) n_close++;
      if (u_dut.cooked.valid && in_ready) begin
        if (u_dut.cooked.tok == TK_CONFRESET) n_reset++;
        if (u_dut.cooked.tok == TK_ENDOFPATH) n_path++;
      end
      if (u_dut.matched.valid && in_ready) begin
        if (u_dut.matched.tok == TK_EMPTYTAGEND) n_empty++;
        if (u_dut.matched.tok == TK_TEXT && u_dut.match) n_text++;
      end
    end
    out_ready <= rand_ready ? ($urandom_range(0, 2) != 0) : 1'b1;
  end

  // fast-forward: a self / descendant-or-self segment hands its live state on
  always @(posedge clk)
    if (!rst && in_ready &&
        u_dut.u_engine.g_grp[0].u_grp.g_seg[1].u_seg.match_out &&
        !u_dut.u_engine.g_grp[0].u_grp.g_seg[1].u_seg.match_q)
      n_ff++;

  task automatic run(input string doc, input string exp, input string name);
    in_str  = doc;
    out_str = "";
    in_idx  = 0;
    // wait until all input is taken and the pipeline has drained
    while (in_idx < in_str.len()) @(posedge clk);
    repeat (N_SEG * 4 + 200) @(posedge clk);
    checks++;
    if (out_str != exp) begin
      failures++;
      $display("FAIL %s:\n  got %s\n  exp %s", name, out_str, exp);
    end else $display("ok   %s", name);
  endtask

  localparam string CONF1 = {
    "<?xml version=\"1.0\"?><?query reset?>",
    "<?query fn:root()/descendant::regions/descendant::item?>\n",
    "<?query fn:root()/descendant::regions/descendant::item\n  /child::name #?>\n",
    "<?query fn:root()/descendant::regions/descendant::item\n  /child::incategory?>\n"};
  localparam string DOC1 = {
    "<site><regions><africa><item id=\"item42\"><name>vapour <b>x</b></name>",
    "<incategory category=\"c3\"/><junk>zz</junk></item></africa></regions>",
    "<!-- a > comment --><open_auctions><open_auction id=\"o0\">abc</open_auction>",
    "</open_auctions></site>"};
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
    in_str = ""; in_idx = 0; out_str = "";
    max_in_run = 0; cur_in_run = 0;
    out_ready = 1'b1;
    repeat (4) @(posedge clk);
    rst = 1'b0;

    run({CONF1, DOC1}, EXP1, "xmark-style paths, ancestors and subtrees");
    run({CONF2, DOC2}, EXP2, "reset, self/dos axes, wildcard, text()");
    rand_ready = 1'b1;
    run({CONF1, DOC1}, EXP1, "same workload with a stalling sink");
    rand_ready = 1'b0;
    repeat (4) @(posedge clk);

    // 4. throughput and latency
    pad = "";
    for (int i = 0; i < 3 * N_SEG + 40; i++) pad = {pad, "a"};
    max_in_run = 0;
    run({"<?query reset?><?query fn:root()/child::r/child::k #?><r>", pad,
         "<k>", pad, "Z</k></r>"},
        {"<r><k>", pad, "Z</k></r>"}, "throughput and latency");
    checks++;
    if (max_in_run < 3 * N_SEG + 40) begin
      failures++;
      $display("FAIL: longest run of back-to-back input bytes %0d", max_in_run);
    end
    checks++;
    if (t_out_z - t_in_z != N_SEG + 1) begin
      failures++;
      $display("FAIL: latency %0d cycles, expected %0d", t_out_z - t_in_z, N_SEG + 1);
    end else $display("ok   latency %0d cycles", t_out_z - t_in_z);

    $display("mechanisms: flush=%0d close=%0d stall=%0d backpressure=%0d reset=%0d paths=%0d empty=%0d text=%0d fastfwd=%0d",
             n_flush, n_close, n_stall, n_bp, n_reset, n_path, n_empty, n_text, n_ff);
    checks++; if (n_flush == 0) begin failures++; $display("FAIL: no ancestor re-creation"); end
    checks++; if (n_close == 0) begin failures++; $display("FAIL: no closing tag printed"); end
    checks++; if (n_stall == 0) begin failures++; $display("FAIL: no input stall"); end
    checks++; if (n_bp    == 0) begin failures++; $display("FAIL: no output backpressure"); end
    checks++; if (n_reset == 0) begin failures++; $display("FAIL: no reconfiguration"); end
    checks++; if (n_path  == 0) begin failures++; $display("FAIL: no path configured"); end
    checks++; if (n_empty == 0) begin failures++; $display("FAIL: no empty-element tag"); end
    checks++; if (n_text  == 0) begin failures++; $display("FAIL: no matched text"); end
    checks++; if (n_ff    == 0) begin failures++; $display("FAIL: no fast-forward"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
