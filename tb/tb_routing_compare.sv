`timescale 1ns/1ps
// tb_routing_compare: the effect of routing on oscillator linearity.
//
// Two oscillator models run side by side: one with the hand-routed delays
// (the default of gray_osc) and one with the delays the tools chose on their
// own for the same placement. Each is enabled and its first 16 steps, one
// full period of the step-delay pattern, are timed. From the step sizes the
// testbench computes the mean step (LSB), DNL_i = (tau_i - LSB) / LSB and
// INL_n = sum of DNL_0..n. Checks: the hand-routed oscillator has the larger
// LSB and the smaller peak DNL and INL (the trade of resolution for
// linearity), and both match the values worked out from the route tables
// (mean 780.6 ps / max |DNL| 0.280 for hand routing; 585.4 ps / 0.508 for
// automatic routing).
module tb_routing_compare;
  import tdc_pkg::*;

  localparam int unsigned AUTO_ROUTE_PS [GRAY_W][GRAY_W] = '{
    '{  0,  295, 696, 701, 664},   // from bit0
    '{477,  475, 193, 198, 700},   // from bit1
    '{165, 1080, 735, 730, 909},   // from bit2
    '{709,  711, 307, 306, 394},   // from bit3
    '{514,  330, 609, 612, 297}    // from bit4
  };

  logic  en = 0;
  gray_t code_man, code_auto;
  int checks = 0, failures = 0;

  gray_osc u_man (.en, .code(code_man));
  gray_osc #(.ROUTE_PS(AUTO_ROUTE_PS)) u_auto (.en, .code(code_auto));

  real step_man [16], step_auto [16];

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic time_steps(input bit which);
    realtime t_prev;
    t_prev = $realtime;
    // steps 1..16 (the first step after the enable is excluded)
    if (which) @(code_auto); else @(code_man);
    t_prev = $realtime;
    for (int s = 0; s < 16; s++) begin
      if (which) @(code_auto); else @(code_man);
      if (which) step_auto[s] = ($realtime - t_prev) * 1000.0;
      else       step_man[s]  = ($realtime - t_prev) * 1000.0;
      t_prev = $realtime;
    end
  endtask

  task automatic linearity(input real st [16], input string name,
                           output real lsb, output real max_dnl, output real max_inl);
    real dnl, inl;
    lsb = 0;
    for (int s = 0; s < 16; s++) lsb += st[s];
    lsb /= 16.0;
    max_dnl = 0; max_inl = 0; inl = 0;
    for (int s = 0; s < 16; s++) begin
      dnl = (st[s] - lsb) / lsb;
      inl += dnl;
      if ((dnl < 0 ? -dnl : dnl) > max_dnl) max_dnl = (dnl < 0 ? -dnl : dnl);
      if ((inl < 0 ? -inl : inl) > max_inl) max_inl = (inl < 0 ? -inl : inl);
    end
    $display("%s routing: LSB %0.1f ps, max |DNL| %0.3f LSB, max |INL| %0.3f LSB",
             name, lsb, max_dnl, max_inl);
  endtask

  initial begin
    real lsb_m, dnl_m, inl_m, lsb_a, dnl_a, inl_a;
    #10 en = 1;
    fork
      time_steps(0);
      time_steps(1);
    join
    en = 0;
    linearity(step_man,  "hand",      lsb_m, dnl_m, inl_m);
    linearity(step_auto, "automatic", lsb_a, dnl_a, inl_a);
    check(lsb_m > lsb_a, "hand routing has the larger LSB");
    check(dnl_m < dnl_a, "hand routing has the smaller DNL");
    check(inl_m < inl_a, "hand routing has the smaller INL");
    check(lsb_m > 780.0 && lsb_m < 781.2, "hand-routed LSB");
    check(lsb_a > 584.8 && lsb_a < 586.0, "automatic LSB");
    check(dnl_m > 0.275 && dnl_m < 0.285, "hand-routed DNL");
    check(dnl_a > 0.503 && dnl_a < 0.513, "automatic DNL");
    #2;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
