`timescale 1ns/1ps
// tb_tdc_merge: drives the channel status levels, the fine and coarse values
// and hit directly. Checks the word layout and coarse difference (modulo
// 2^16), that the FIFO write comes exactly 2 clock edges after the stop
// capture is first sampled (one MERGE cycle, then STORE), that count_reset is withheld while hit is high, that a
// write into a full FIFO is flagged as dropped, and that a stop captured with
// no start is discarded through count_reset without a write.
module tb_tdc_merge;
  import tdc_pkg::*;
  logic      clk = 0, rst_n = 0, hit = 0;
  logic      start_captured = 0, stop_captured = 0, fifo_full = 0;
  gray_t     start_fine = '0, stop_fine = '0;
  coarse_t   start_coarse = '0, stop_coarse = '0;
  logic      fifo_wr, count_reset, dropped, stray_stop;
  tdc_word_t fifo_wdata;
  int checks = 0, failures = 0;
  int writes = 0, resets = 0, drops = 0, strays = 0;

  tdc_merge dut (.clk, .rst_n, .hit, .start_captured, .stop_captured,
                 .start_fine, .stop_fine, .start_coarse, .stop_coarse, .fifo_full,
                 .fifo_wr, .fifo_wdata, .count_reset, .dropped, .stray_stop);

  always #4 clk = !clk;

  always @(posedge clk) begin
    if (fifo_wr) writes++;
    if (count_reset) resets++;
    if (dropped) drops++;
    if (stray_stop) strays++;
  end

  // Channels leave WAIT on count_reset.
  always @(posedge clk) if (count_reset) begin
    start_captured <= 0;
    stop_captured  <= 0;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %t", what, $realtime); end
  endtask

  initial begin
    logic [31:0] expw;
    int w0, r0, d0, hold, cyc;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int m = 0; m < 40; m++) begin
      start_fine   = 5'($urandom_range(1, 31));
      stop_fine    = 5'($urandom_range(1, 31));
      start_coarse = 16'($urandom);
      stop_coarse  = 16'($urandom);
      fifo_full    = (m % 7 == 6);
      hold         = (m % 5 == 4) ? $urandom_range(3, 8) : 0;
      hit = 1;
      w0 = writes; r0 = resets; d0 = drops;
      @(negedge clk) start_captured = 1;
      repeat ($urandom_range(1, 6)) @(negedge clk);
      if (hold == 0) hit = 0;
      stop_captured = 1;
      // the state machine sees stop in MEASURING at the next edge (to MERGE);
      // the edge after that enters STORE
      @(posedge clk); #1 cyc = 0;
      while (!fifo_wr && cyc < 10) begin @(posedge clk); #1 cyc++; end
      check(cyc == 1, "write in the cycle after MERGE");
      expw = {6'd0, 16'(stop_coarse - start_coarse), stop_fine, start_fine};
      check(fifo_wdata == expw, "merged word");
      check(dropped == fifo_full, "drop flag follows FIFO full");
      if (hold) begin
        repeat (hold) begin
          @(posedge clk); #1 check(!count_reset, "count_reset withheld while hit high");
        end
        hit = 0;
      end
      cyc = 0;
      while (!count_reset && cyc < 10) begin @(posedge clk); #1 cyc++; end
      check(count_reset, "count_reset issued");
      @(posedge clk); #1;
      check(writes == w0 + 1 && resets == r0 + 1, "one write and one reset per measurement");
      check(drops == d0 + (fifo_full ? 1 : 0), "drop counted");
      fifo_full = 0;
      repeat (2) @(posedge clk);
    end
    // stray stop in IDLE
    w0 = writes;
    @(negedge clk) stop_captured = 1;
    cyc = 0;
    while (!count_reset && cyc < 10) begin @(posedge clk); #1 cyc++; end
    check(count_reset && strays == 1, "stray stop discarded");
    @(posedge clk); #1 check(writes == w0, "no write for a stray stop");
    check(drops > 0, "drop path exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #50000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
