// tb_tag_ram: byte-lane writes and synchronous reads of the shared tag RAM.
//
// Random writes into random lanes are mirrored in a reference array; every
// read is compared one cycle later with the reference word. Reads with re
// low must hold the previous output.
module tb_tag_ram;
  localparam int SHARE = 3, DEPTH = 64;

  logic clk = 1'b0;
  logic re, we;
  logic [5:0] raddr, waddr;
  logic [1:0] wlane;
  logic [7:0] wdata;
  logic [8*SHARE-1:0] rdata, expw, held;
  logic [8*SHARE-1:0] ref_mem [DEPTH];
  int checks = 0, failures = 0, cycle = 0;

  tag_ram #(.SHARE(SHARE), .TAG_DEPTH(DEPTH)) u_dut (
    .clk, .re, .raddr, .rdata, .we, .wlane, .waddr, .wdata
  );

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (cycle > 100000) begin
      failures++;
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  initial begin
    re = 0; we = 0; raddr = 0; waddr = 0; wlane = 0; wdata = 0;
    // fill every word through the write port
    for (int a = 0; a < DEPTH; a++)
      for (int l = 0; l < SHARE; l++) begin
        we = 1; waddr = 6'(a); wlane = 2'(l); wdata = 8'($urandom);
        ref_mem[a][8*l +: 8] = wdata;
        @(posedge clk); #1;
      end
    we = 0;
    for (int i = 0; i < 2000; i++) begin
      we = $urandom_range(0, 1) == 0;
      waddr = 6'($urandom); wlane = 2'($urandom_range(0, SHARE - 1)); wdata = 8'($urandom);
      re = $urandom_range(0, 3) != 0;
      raddr = 6'($urandom);
      if (we && waddr == raddr) we = 0;  // read-during-write of one address not relied on
      expw = re ? ref_mem[raddr] : rdata;
      @(posedge clk); #1;
      if (we) ref_mem[waddr][8*wlane +: 8] = wdata;
      checks++;
      if (rdata !== expw) begin
        failures++;
        if (failures < 5) $display("FAIL: read %h expected %h", rdata, expw);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
