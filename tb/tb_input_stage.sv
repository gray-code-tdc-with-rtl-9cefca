`timescale 1ns/1ps
// tb_input_stage: checks that a rising hit_edge sets the enable at once,
// that a clear request or reset clears it and blocks further edges while held,
// and that a falling edge does nothing.
module tb_input_stage;
  logic hit_edge = 0, nrst = 1, clr_req = 0;
  logic en;
  int checks = 0, failures = 0;

  input_stage dut (.hit_edge, .nrst, .clr_req, .en);

  task automatic expect_en(input logic v, input string what);
    checks++;
    if (en !== v) begin
      failures++;
      $display("FAIL %s: en=%0b expected %0b at %t", what, en, v, $realtime);
    end
  endtask

  initial begin
    #0.5 nrst = 0;
    #5 expect_en(0, "reset");
    hit_edge = 1; #0.1 expect_en(0, "edge during reset ignored");
    hit_edge = 0; #1 nrst = 1; #1;
    expect_en(0, "idle after reset");
    for (int i = 0; i < 20; i++) begin
      hit_edge = 1; #0.01 expect_en(1, "rising edge sets enable");
      #($urandom_range(1, 50) * 0.1);
      hit_edge = 0; #0.1 expect_en(1, "falling edge keeps enable");
      clr_req = 1; #0.01 expect_en(0, "clear request clears");
      hit_edge = 1; #0.1 expect_en(0, "edge while clear held is ignored");
      hit_edge = 0; #0.1 clr_req = 0; #0.1 expect_en(0, "stays clear after release");
      if (i % 4 == 3) begin
        hit_edge = 1; #0.1 nrst = 0; #0.01 expect_en(0, "reset clears");
        hit_edge = 0; #0.1 nrst = 1; #0.1;
      end
    end
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
