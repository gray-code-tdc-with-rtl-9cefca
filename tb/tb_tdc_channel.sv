`timescale 1ns/1ps
// tb_tdc_channel: drives the oscillator bits directly. For each measurement a
// code appears before a clock edge and is cleared (as the input stage would
// do) once store rises. Checks: store is high for exactly the one cycle after
// the sampling edge, fine holds the code from the next edge, captured and
// clr_req stay high until count_reset, codes seen while waiting are ignored,
// and a hit whose first sample is still zero is stored one cycle later.
module tb_tdc_channel;
  import tdc_pkg::*;
  logic  clk = 0, rst_n = 0, count_reset = 0;
  gray_t gray_in = '0;
  gray_t sampled, fine;
  logic  store, clr_req, captured;
  int checks = 0, failures = 0;

  tdc_channel dut (.clk, .rst_n, .gray_in, .count_reset, .sampled, .store,
                   .clr_req, .captured, .fine);

  always #4 clk = !clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %t", what, $realtime); end
  endtask

  initial begin
    gray_t code;
    int    lag;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int m = 0; m < 30; m++) begin
      code = 5'($urandom_range(1, 31));
      lag  = (m % 5 == 4) ? 1 : 0;   // sometimes the first sample is zero
      @(negedge clk);
      check(!store && !captured && !clr_req, "idle before hit");
      if (lag) begin
        // hit too close to the edge: still zero at this edge
        @(posedge clk); #0.1;
        check(!store, "no store after a zero sample");
        @(negedge clk);
      end
      gray_in = code;
      @(posedge clk); #0.1;                 // sampling edge
      check(sampled == code, "first register samples the code");
      check(store, "store raised after non-zero sample");
      check(clr_req, "clear request with store");
      #0.5 gray_in = '0;                    // input stage cleared by store
      @(posedge clk); #0.1;                 // store edge
      check(!store, "store lasts one cycle");
      check(fine == code, "fine holds the sampled code");
      check(captured && clr_req, "waiting for count_reset");
      // a stray code while waiting must not disturb the stored value
      gray_in = 5'h1f;
      repeat ($urandom_range(1, 4)) begin
        @(posedge clk); #0.1;
        check(!store && fine == code, "held while waiting");
      end
      gray_in = '0;
      repeat (2) @(posedge clk);
      #0.1 count_reset = 1;
      @(posedge clk); #0.1 count_reset = 0;
      check(!captured && !clr_req, "back to idle after count_reset");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
