`timescale 1ns/1ps
// tb_code_density: code density and single-shot test of the full unit.
//
// hit is a square wave of 999133 Hz whose high time is 480.7 ns. Its period is
// not a multiple of the 8 ns clock, so the edges slide across the clock cycle
// and every fine code is hit in proportion to its bin width. A reader drains
// one word over AXI4-Lite after every pulse.
//
// For both channels the bin width of code i is estimated as
//   tau_i = N_i * T / N_total      (T = 8 ns)
// and compared with the bin widths of the oscillator (the step that leaves
// code i). Codes reached only through a late first sample (hit within the
// first step of a clock edge) collect the time past one clock period, so the
// comparison covers the codes that are fully inside one period. Also checked:
// no missing codes in that range, every measured width within one step of
// 480.7 ns, and the spread (RMS) of the measured widths. DNL and INL in LSB
// are printed for reference.
module tb_code_density;
  import tdc_pkg::*;

  localparam int     N_MEAS   = 100000;
  localparam real    HIT_PER  = 1.0e9 / 999133.0;   // ns
  localparam real    HIT_HIGH = 480.7;              // ns
  localparam longint PERIOD_PS = 8000;

  logic clk = 0, nrst = 1, hit = 0;
  logic [3:0]  araddr = '0;
  logic        arvalid = 0, rready = 1;
  logic [31:0] rdata;
  logic        arready, rvalid, awready, wready, bvalid;
  logic [1:0]  rresp, bresp;
  logic        ev_dropped, ev_stray_stop;

  gray_tdc_top dut (
    .clk, .nrst, .hit,
    .s_axi_awaddr('0), .s_axi_awprot('0), .s_axi_awvalid(1'b0), .s_axi_awready(awready),
    .s_axi_wdata('0), .s_axi_wstrb('0), .s_axi_wvalid(1'b0), .s_axi_wready(wready),
    .s_axi_bresp(bresp), .s_axi_bvalid(bvalid), .s_axi_bready(1'b1),
    .s_axi_araddr(araddr), .s_axi_arprot('0), .s_axi_arvalid(arvalid),
    .s_axi_arready(arready), .s_axi_rdata(rdata), .s_axi_rresp(rresp),
    .s_axi_rvalid(rvalid), .s_axi_rready(rready),
    .ev_dropped, .ev_stray_stop);

  always #4 clk = !clk;

  // Reset is applied as a pulse, as the FPGA's global reset does, so the
  // input-stage flip-flops see their clear rise.
  initial #0.5 nrst = 0;

  int checks = 0, failures = 0;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %t", what, $realtime); end
  endtask

  // Reference bin widths (ps), the same step table as the oscillator's.
  function automatic longint pair_ps(input int from, input int to);
    if (from == 0) case (to) 1: return 999; 2: return 809; 3: return 814; default: return 788; endcase
    case (from) 1: return 600; 2: return 703; 3: return 832; default: return 636; endcase
  endfunction
  function automatic int ctz(input int v);
    for (int i = 0; i < 5; i++) if (v[i]) return i;
    return 4;
  endfunction
  longint cum [33];
  initial begin
    cum[0] = 0;
    cum[1] = 623;
    for (int k = 1; k < 32; k++) cum[k+1] = cum[k] + pair_ps(ctz(k), ctz(k + 1));
  end

  int hist_start [32];
  int hist_stop  [32];
  int n_words = 0;
  real sum_w = 0.0, sum_w2 = 0.0;
  int  bad_width = 0;

  // hit generator
  initial begin
    real t0;
    repeat (3) @(posedge clk);
    #1 nrst = 1;
    #100.123;
    t0 = $realtime;
    for (int i = 0; i < N_MEAS; i++) begin
      // absolute edge times avoid accumulating rounding
      #(t0 + i * HIT_PER - $realtime);
      hit = 1;
      #(t0 + i * HIT_PER + HIT_HIGH - $realtime);
      hit = 0;
    end
  end

  // reader: one word after every falling edge
  initial begin
    tdc_word_t w;
    int sn, pn;
    real meas;
    for (int i = 0; i < 32; i++) begin hist_start[i] = 0; hist_stop[i] = 0; end
    wait (nrst);
    for (int i = 0; i < N_MEAS; i++) begin
      @(negedge hit);
      repeat (14) @(posedge clk);
      @(negedge clk);
      araddr = 4'h0; arvalid = 1;
      do @(posedge clk); while (!arready);
      #1 arvalid = 0;
      while (!rvalid) begin @(posedge clk); #1; end
      if (rresp != 2'b00) begin
        failures++;
        $display("FAIL no word after pulse %0d", i);
        continue;
      end
      w  = tdc_word_t'(rdata);
      sn = int'(gray2bin(w.start_fine));
      pn = int'(gray2bin(w.stop_fine));
      hist_start[sn]++;
      hist_stop[pn]++;
      n_words++;
      meas = real'(w.coarse) * 8.0 + real'(cum[sn] + cum[sn+1]) / 2000.0
           - real'(cum[pn] + cum[pn+1]) / 2000.0;
      sum_w  += meas;
      sum_w2 += meas * meas;
      if (meas - HIT_HIGH > 1.0 || HIT_HIGH - meas > 1.0) begin
        bad_width++;
        if (bad_width <= 5) $display("  pulse %0d measured %0.3f ns (coarse %0d, start %0d, stop %0d)", i, meas, w.coarse, sn, pn);
      end
    end
    finish_report();
  end

  task automatic finish_report();
    real tau, ref_tau, mean, rms, lsb, dnl, inl, max_dnl, max_inl;
    int  last_full;
    check(n_words == N_MEAS, "one word per pulse");
    check(bad_width == 0, "every width within one step of 480.7 ns");
    mean = sum_w / n_words;
    rms  = $sqrt(sum_w2 / n_words - mean * mean);
    $display("single shot: mean %0.3f ns, rms %0.1f ps over %0d measurements", mean, rms * 1000.0, n_words);
    check(rms < 0.6, "single-shot spread below 600 ps");
    // codes whose whole bin lies inside one clock period
    last_full = 0;
    for (int k = 1; k < 32; k++) if (cum[k+1] <= PERIOD_PS) last_full = k;
    for (int ch = 0; ch < 2; ch++) begin
      lsb = real'(cum[last_full+1] - cum[1]) / last_full;
      max_dnl = 0; max_inl = 0; inl = 0;
      for (int k = 1; k <= last_full; k++) begin
        tau     = real'(ch == 0 ? hist_start[k] : hist_stop[k]) * 8000.0 / n_words;
        ref_tau = real'(cum[k+1] - cum[k]);
        check(tau > 0.0, "no missing code");
        check(tau > ref_tau * 0.9 && tau < ref_tau * 1.1, "bin width matches the oscillator");
        dnl = (tau - lsb) / lsb;
        inl += dnl;
        if ((dnl < 0 ? -dnl : dnl) > max_dnl) max_dnl = (dnl < 0 ? -dnl : dnl);
        if ((inl < 0 ? -inl : inl) > max_inl) max_inl = (inl < 0 ? -inl : inl);
        $display("%s code %2d: tau %6.1f ps (oscillator %0d ps)", ch == 0 ? "start" : "stop ",
                 k, tau, cum[k+1] - cum[k]);
      end
      $display("%s channel: LSB %0.1f ps, max |DNL| %0.2f LSB, max |INL| %0.2f LSB",
               ch == 0 ? "start" : "stop", lsb, max_dnl, max_inl);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    #110ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
