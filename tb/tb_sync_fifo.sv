`timescale 1ns/1ps
// tb_sync_fifo: random writes and reads against a queue model on a small
// FIFO; checks data order, empty, full, level, and that writes when full and
// reads when empty are ignored.
module tb_sync_fifo;
  localparam int W = 32, D = 8;
  logic clk = 0, rst_n = 0, wr_en = 0, rd_en = 0;
  logic [W-1:0] wdata = '0, rdata;
  logic empty, full;
  logic [$clog2(D):0] level;
  logic [W-1:0] model [$];
  int checks = 0, failures = 0, full_seen = 0, empty_reads = 0;

  sync_fifo #(.WIDTH(W), .DEPTH(D)) dut (.clk, .rst_n, .wr_en, .wdata, .rd_en,
                                         .rdata, .empty, .full, .level);

  always #4 clk = !clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %t", what, $realtime); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      check(empty == (model.size() == 0), "empty");
      check(full == (model.size() == D), "full");
      check(level == model.size(), "level");
      if (model.size() > 0) check(rdata == model[0], "head data");
      // phases bias towards filling and draining
      wr_en = ((i / 100) % 2 == 0) ? ($urandom_range(0, 3) != 0) : ($urandom_range(0, 3) == 0);
      rd_en = ((i / 100) % 2 == 0) ? ($urandom_range(0, 3) == 0) : ($urandom_range(0, 3) != 0);
      wdata = $urandom;
      if (full && wr_en) full_seen++;
      if (empty && rd_en) empty_reads++;
      @(posedge clk);
      if (rd_en && model.size() > 0) void'(model.pop_front());
      if (wr_en && model.size() + (rd_en && !empty ? 1 : 0) <= D && !full) model.push_back(wdata);
    end
    check(full_seen > 0 && empty_reads > 0, "both limits reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
