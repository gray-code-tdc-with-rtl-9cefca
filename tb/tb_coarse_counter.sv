`timescale 1ns/1ps
// tb_coarse_counter: checks that the counter advances once per clock, that
// each store pulse samples the count of its own cycle, that count_reset
// clears the counter and the samples, and that the count wraps at 2^16.
module tb_coarse_counter;
  localparam int W = 16;
  logic clk = 0, rst_n = 0, count_reset = 0, store_start = 0, store_stop = 0;
  logic [W-1:0] count, start_val, stop_val;
  int checks = 0, failures = 0;

  coarse_counter dut (.clk, .rst_n, .count_reset, .store_start, .store_stop,
                      .count, .start_val, .stop_val);

  always #4 clk = !clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %t", what, $realtime); end
  endtask

  int unsigned ref_cnt;

  initial begin
    logic [W-1:0] a, b;
    int gap;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    ref_cnt = 0;
    for (int m = 0; m < 20; m++) begin
      repeat ($urandom_range(0, 5)) @(posedge clk);
      #1 store_start = 1; a = count;
      @(posedge clk); #1 store_start = 0;
      check(start_val == a, "start sample");
      check(count == a + 1'b1, "counter advanced by one");
      gap = $urandom_range(0, 70);
      repeat (gap) @(posedge clk);
      #1 store_stop = 1; b = count;
      check(b == W'(a + 1 + gap), "count after gap");
      @(posedge clk); #1 store_stop = 0;
      check(stop_val == b && start_val == a, "stop sample");
      check(W'(stop_val - start_val) == W'(gap + 1), "difference");
      count_reset = 1;
      @(posedge clk); #1 count_reset = 0;
      check(count == 0 && start_val == 0 && stop_val == 0, "count_reset clears");
    end
    // wrap: run 2^16 + 5 cycles
    repeat ((1 << W) + 5) @(posedge clk);
    #1 check(count == 5, "wraps modulo 2^16");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
