`timescale 1ns/1ps
// tb_axi_lite_slave: a queue stands in for the FIFO. Checks that reading DATA
// returns the oldest word and removes exactly that word, that reading DATA
// when empty gives SLVERR and removes nothing, that STATUS reports empty, full
// and level, that a response is held while rready is low, and that writes are
// answered OKAY. Each read response arrives one cycle after the address.
module tb_axi_lite_slave;
  localparam int AW = 4, DW = 32, LW = 10;
  logic aclk = 0, aresetn = 0;
  logic [AW-1:0] awaddr = '0, araddr = '0;
  logic [2:0] awprot = '0, arprot = '0;
  logic awvalid = 0, wvalid = 0, bready = 0, arvalid = 0, rready = 0;
  logic awready, wready, bvalid, arready, rvalid;
  logic [DW-1:0] wdata = '0, rdata;
  logic [DW/8-1:0] wstrb = '1;
  logic [1:0] bresp, rresp;
  logic [DW-1:0] fifo_rdata;
  logic fifo_empty, fifo_full, fifo_rd;
  logic [LW-1:0] fifo_level;
  logic [DW-1:0] q [$];
  int checks = 0, failures = 0;

  axi_lite_slave #(.ADDR_W(AW), .DATA_W(DW), .LEVEL_W(LW)) dut (
    .aclk, .aresetn,
    .s_awaddr(awaddr), .s_awprot(awprot), .s_awvalid(awvalid), .s_awready(awready),
    .s_wdata(wdata), .s_wstrb(wstrb), .s_wvalid(wvalid), .s_wready(wready),
    .s_bresp(bresp), .s_bvalid(bvalid), .s_bready(bready),
    .s_araddr(araddr), .s_arprot(arprot), .s_arvalid(arvalid), .s_arready(arready),
    .s_rdata(rdata), .s_rresp(rresp), .s_rvalid(rvalid), .s_rready(rready),
    .fifo_rdata, .fifo_empty, .fifo_full, .fifo_level, .fifo_rd);

  always #4 aclk = !aclk;

  // FIFO model with 16 entries
  assign fifo_empty = (q.size() == 0);
  assign fifo_full  = (q.size() == 16);
  assign fifo_level = LW'(q.size());
  assign fifo_rdata = fifo_empty ? 32'hdead_beef : q[0];
  // pop at the following falling edge, so the DUT samples the head first
  logic pop_d = 0;
  always @(posedge aclk) pop_d <= fifo_rd;
  always @(negedge aclk) if (pop_d) void'(q.pop_front());

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %t", what, $realtime); end
  endtask

  task automatic axi_read(input logic [AW-1:0] a, input int stall,
                          output logic [DW-1:0] d, output logic [1:0] r);
    int cyc;
    @(negedge aclk);
    araddr = a; arvalid = 1; rready = 0;
    @(posedge aclk); #1;
    check(!arready || rvalid, "address taken");
    arvalid = 0;
    check(rvalid, "read response one cycle after the address");
    d = rdata; r = rresp;
    repeat (stall) begin
      @(posedge aclk); #1 check(rvalid && rdata == d && rresp == r, "response held");
    end
    @(negedge aclk) rready = 1;
    @(posedge aclk); #1 rready = 0;
    check(!rvalid, "response taken");
  endtask

  initial begin
    logic [DW-1:0] d, exp;
    logic [1:0] r;
    repeat (2) @(posedge aclk);
    #1 aresetn = 1;
    for (int round = 0; round < 30; round++) begin
      automatic int n = $urandom_range(0, 16);
      repeat (n) if (q.size() < 16) q.push_back($urandom);
      axi_read(4'h4, 0, d, r);
      check(r == 2'b00 && d[0] == (q.size() == 0) && d[1] == (q.size() == 16)
            && d[31:16] == 16'(q.size()), "status word");
      while (q.size() > 0) begin
        automatic int n_before = q.size();
        exp = q[0];
        axi_read(4'h0, $urandom_range(0, 2), d, r);
        check(r == 2'b00 && d == exp, "data word"); if (d != exp) $display("  got %h exp %h r=%b", d, exp, r);
        check(q.size() == n_before - 1, "one word removed");
      end
      axi_read(4'h0, 0, d, r);
      check(r == 2'b10 && d == 0, "empty read is SLVERR");
      check(q.size() == 0, "nothing removed");
      // a write is answered OKAY
      @(negedge aclk) awaddr = 4'h0; wdata = $urandom; awvalid = 1; wvalid = 1; bready = 0;
      @(posedge aclk); #1 awvalid = 0; wvalid = 0;
      check(bvalid && bresp == 2'b00, "write response");
      @(negedge aclk) bready = 1;
      @(posedge aclk); #1 bready = 0;
      check(!bvalid, "write response taken");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
