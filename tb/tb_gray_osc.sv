`timescale 1ns/1ps
// tb_gray_osc: checks the oscillator model against the start-channel step
// sizes of the timing simulation (999, 600, 809, 704, 999, 600, 814, 832 ps,
// ...), that the codes follow the 5-bit reflected binary sequence including
// the wrap from 0x10 to 0x00, that the code returns to zero after the
// enable falls, and the five LUT truth tables.
module tb_gray_osc;
  import tdc_pkg::*;
  logic  en = 0;
  gray_t code;
  int checks = 0, failures = 0;

  gray_osc dut (.en, .code);

  // Step size in ps for (bit that changed last -> LUT that changes next),
  // worked out from the printed step sizes; index [from][to].
  function automatic int step_ps(input int from, input int to);
    if (from == 5) return 623;              // first step after enable
    if (from == 0) case (to) 1: return 999; 2: return 809; 3: return 814; 4: return 788; default: return -1; endcase
    if (to == 0)   case (from) 1: return 600; 2: return 703; 3: return 832; 4: return 636; default: return -1; endcase
    return -1;
  endfunction

  initial begin
    realtime t_en, t_prev, t_now;
    gray_t   exp_code;
    int      last, nxt, d, dt;
    // 0) LUT truth tables, worked out separately for the pin order
    //    I0 = bit4 ... I4 = bit0, I5 = enable.
    begin
      logic [63:0] golden [5];
      golden = '{64'h9669966900000000, 64'h6969FF0000000000, 64'hF0F099F000000000,
                 64'hCCCCCC5C00000000, 64'hAAAAAAAC00000000};
      for (int b = 0; b < 5; b++) begin
        checks++;
        if (lut_init(b) !== golden[b]) begin
          failures++; $display("FAIL LUT%0d INIT %h expected %h", b, lut_init(b), golden[b]);
        end
      end
    end
    #10;
    // 1) Run for 40 steps (past the wrap).
    en = 1; t_en = $realtime; t_prev = t_en;
    exp_code = '0; last = 5;
    for (int s = 0; s < 40; s++) begin
      @(code);
      t_now = $realtime;
      nxt = 0;
      // next code computed independently: binary count + 1, converted
      begin
        logic [4:0] nb, ng;
        nb = 5'((s + 1) % 32);
        ng = nb ^ (nb >> 1);
        for (int b = 0; b < 5; b++) if (ng[b] != exp_code[b]) nxt = b;
        exp_code = ng;
      end
      d  = step_ps(last, nxt);
      dt = int'((t_now - t_prev) * 1000.0);
      checks++;
      if (code !== exp_code) begin
        failures++; $display("FAIL step %0d code %h expected %h", s, code, exp_code);
      end
      checks++;
      if (dt < d - 2 || dt > d + 2) begin
        failures++; $display("FAIL step %0d took %0d ps expected %0d", s, dt, d);
      end
      last = nxt; t_prev = t_now;
    end
    // 2) Disable: code returns to zero after the enable route and LUT delay.
    en = 0; t_prev = $realtime;
    wait (code == 0);
    dt = int'(($realtime - t_prev) * 1000.0);
    checks++;
    if (dt > 700) begin failures++; $display("FAIL clear took %0d ps", dt); end
    // 3) A short enable: 2 ns gives exactly 3 steps (623+999+600 ps > 2000 > 623+999).
    #5 en = 1; #2.0 en = 0;
    checks++;
    if (code !== 5'h03) begin failures++; $display("FAIL short enable reached %h", code); end
    #2 checks++;
    if (code !== 5'h00) begin failures++; $display("FAIL not cleared"); end
    // 4) Enable dropped mid-step: no further step.
    en = 1; #0.7 en = 0; #0.3;
    checks++;
    if (code !== 5'h01) begin failures++; $display("FAIL mid-step stop gave %h", code); end
    #2;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
