// tb_cnfa_block: history shift register and NFA gate logic against a
// software stack model.
//
// Random sequences of element opens (with random tag_hit and match_in) and
// closes are applied with and without the descendant loop, after a
// set_root or from an empty history; the state output is compared with a
// model that evaluates match = (hit and match_in) or (loop and top) on
// push and pops the stack on close.
module tb_cnfa_block;
  import xp_pkg::*;

  logic clk = 1'b0, rst = 1'b1, adv = 1'b0;
  cooked_t din;
  logic tag_hit, match_in, loop, set_root, clear, state;
  int checks = 0, failures = 0, cycle = 0;
  bit model [$];

  cnfa_block #(.HIST_DEPTH(16)) u_dut (
    .clk, .rst, .adv, .din, .tag_hit, .match_in, .loop, .set_root, .clear, .state
  );

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (cycle > 200000) begin
      failures++;
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  task automatic step(input token_e t, input bit h, input bit mi, input bit sr, input bit cl);
    din <= '{valid: 1'b1, tok: t, ch: 8'h00};
    tag_hit <= h; match_in <= mi; set_root <= sr; clear <= cl; adv <= 1'b1;
    @(posedge clk);
    adv <= 1'b0; set_root <= 1'b0; clear <= 1'b0;
    @(negedge clk);
  endtask

  initial begin
    din = '{valid: 1'b0, tok: TK_NONE, ch: 8'h00};
    tag_hit = 0; match_in = 0; loop = 0; set_root = 0; clear = 0;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    for (int run = 0; run < 40; run++) begin
      loop = run[0];
      step(TK_TEXT, 0, 0, 0, 1);                 // clear
      model.delete(); model.push_front(1'b0);
      if (run[1]) begin
        step(TK_TEXT, 0, 0, 1, 0);               // fn:root(): document level true
        model[0] = 1'b1;
      end
      for (int i = 0; i < 60; i++) begin
        bit h, mi, nm;
        int depth;
        token_e t;
        h = 1'($urandom_range(0, 1));
        mi = 1'($urandom_range(0, 1));
        depth = model.size() - 1;
        if (depth < 12 && (depth == 0 || $urandom_range(0, 1))) begin
          t = $urandom_range(0, 1) ? TK_OPENINGTAGEND : TK_EMPTYTAGSLASH;
          nm = (h && mi) || (loop && model[0]);
          step(t, h, mi, 0, 0);
          model.push_front(nm);
        end else begin
          step($urandom_range(0, 1) ? TK_CLOSINGTAGEND : TK_EMPTYTAGEND, h, mi, 0, 0);
          void'(model.pop_front());
        end
        // bytes that are neither push nor pop leave the state alone
        step(TK_TEXT, 1, 1, 0, 0);
        checks++;
        if (state !== model[0]) begin
          failures++;
          if (failures < 5) $display("FAIL: run %0d step %0d state %0b model %0b", run, i, state, model[0]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
