`timescale 1ns/1ps
// tb_gray_tdc_top: end-to-end test of the pulse measurement unit at its
// default parameters (125 MHz clock, 16-bit coarse counter, 512-word FIFO).
//
// Pulses of known width are applied to hit at picosecond-resolution times and
// the words are read back over AXI4-Lite. For every pulse the testbench works
// out, from its own table of oscillator step sizes, which gray code each
// channel must hold and which coarse difference must result, and checks the
// word exactly (one step of slack where a step lands within 2 ps of a clock
// edge). It also rebuilds the width as
//   8 ns * coarse + t(start code) - t(stop code)
// with t the mid-point of the code's bin, and checks it within one step.
//
// Mechanisms made to happen and counted (each must occur):
//   short      pulse shorter than one clock period
//   late       hit so close to a clock edge that the first sample is zero and
//              the channel stores one cycle later
//   long       pulse of LiDAR range (over 1 us)
//   held       next pulse arriving before count_reset, which is withheld
//              while hit is high, so that pulse is not measured
//   stray      stop edge with no start edge (hit high out of reset), discarded
//   dropped    measurements arriving with the FIFO full
//   full       FIFO reported full in STATUS
//   slverr     read of DATA with the FIFO empty
module tb_gray_tdc_top;
  import tdc_pkg::*;

  localparam longint PERIOD_PS = 8000;
  localparam longint EDGE0_PS  = 4000;   // first rising clock edge

  logic clk = 0, nrst = 1, hit = 0;
  logic [3:0]  awaddr = '0, araddr = '0;
  logic [2:0]  awprot = '0, arprot = '0;
  logic        awvalid = 0, wvalid = 0, bready = 1, arvalid = 0, rready = 1;
  logic [31:0] wdata = '0, rdata;
  logic [3:0]  wstrb = '1;
  logic        awready, wready, bvalid, arready, rvalid;
  logic [1:0]  bresp, rresp;
  logic        ev_dropped, ev_stray_stop;

  gray_tdc_top dut (
    .clk, .nrst, .hit,
    .s_axi_awaddr(awaddr), .s_axi_awprot(awprot), .s_axi_awvalid(awvalid),
    .s_axi_awready(awready), .s_axi_wdata(wdata), .s_axi_wstrb(wstrb),
    .s_axi_wvalid(wvalid), .s_axi_wready(wready), .s_axi_bresp(bresp),
    .s_axi_bvalid(bvalid), .s_axi_bready(bready),
    .s_axi_araddr(araddr), .s_axi_arprot(arprot), .s_axi_arvalid(arvalid),
    .s_axi_arready(arready), .s_axi_rdata(rdata), .s_axi_rresp(rresp),
    .s_axi_rvalid(rvalid), .s_axi_rready(rready),
    .ev_dropped, .ev_stray_stop);

  always #4 clk = !clk;

  // Reset is applied as a pulse, as the FPGA's global reset does, so the
  // input-stage flip-flops see their clear rise.
  initial #0.5 nrst = 0;

  int checks = 0, failures = 0;
  int n_short = 0, n_late = 0, n_long = 0, n_held = 0, n_stray = 0;
  int n_dropped = 0, n_full = 0, n_slverr = 0, n_meas = 0;

  always @(posedge clk) begin
    if (ev_dropped) n_dropped++;
    if (ev_stray_stop) n_stray++;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %t", what, $realtime); end
  endtask

  // ---- reference oscillator timing -------------------------------------
  // Step size in ps from the bit that changed last to the bit that changes
  // next; the first step after the enable is 623 ps.
  function automatic longint pair_ps(input int from, input int to);
    if (from == 0) case (to) 1: return 999; 2: return 809; 3: return 814; default: return 788; endcase
    case (from) 1: return 600; 2: return 703; 3: return 832; default: return 636; endcase
  endfunction
  function automatic int ctz(input int v);
    for (int i = 0; i < 5; i++) if (v[i]) return i;
    return 4;
  endfunction
  longint cum [33];   // cum[n]: time from enable to reaching binary count n
  initial begin
    cum[0] = 0;
    cum[1] = 623;
    for (int k = 1; k < 32; k++) cum[k+1] = cum[k] + pair_ps(ctz(k), ctz(k + 1));
  end

  // Count reached d ps after the enable; near is set when a step falls
  // within 2 ps of d.
  function automatic int count_at(input longint d, output bit near);
    int n = 0;
    near = 0;
    for (int k = 1; k <= 31; k++) begin
      if (cum[k] <= d) n = k;
      if (cum[k] >= d - 2 && cum[k] <= d + 2) near = 1;
    end
    return n;
  endfunction

  // First sampling edge with a non-zero code for an edge at t ps.
  task automatic expect_channel(input longint t, output longint e, output int n,
                                output bit near, output bit late);
    bit nr;
    e = ((t - EDGE0_PS) / PERIOD_PS + 1) * PERIOD_PS + EDGE0_PS;
    n = count_at(e - t, nr);
    late = (n == 0);
    if (n == 0) begin
      e += PERIOD_PS;
      n = count_at(e - t, near);
      near |= nr;
    end else near = nr;
  endtask

  typedef struct {
    longint width_ps;
    int     start_n, stop_n, coarse;
    bit     near;
  } exp_t;
  exp_t expq [$];

  // ---- stimulus ----------------------------------------------------------
  function automatic longint now_ps();
    return longint'($realtime * 1000.0 + 0.5);
  endfunction

  // Wait until offset ps after a clock edge, then apply a pulse of width ps.
  // The expectation is recorded when record is set.
  task automatic pulse(input longint offset, input longint width, input bit record);
    longint t_r, t_f, e_s, e_p;
    int n_s, n_p;
    bit nr_s, nr_p, late_s, late_p;
    exp_t x;
    @(posedge clk);
    #(real'(offset) / 1000.0);
    t_r = now_ps();
    hit = 1;
    #(real'(width) / 1000.0);
    t_f = now_ps();
    hit = 0;
    if (!record) return;
    expect_channel(t_r, e_s, n_s, nr_s, late_s);
    expect_channel(t_f, e_p, n_p, nr_p, late_p);
    x.width_ps = t_f - t_r;
    x.start_n  = n_s;
    x.stop_n   = n_p;
    x.coarse   = int'((e_p - e_s) / PERIOD_PS);
    x.near     = nr_s | nr_p;
    expq.push_back(x);
    if (late_s || late_p) n_late++;
    if (width < PERIOD_PS) n_short++;
    if (width > 1000000) n_long++;
  endtask

  // ---- AXI4-Lite read ----------------------------------------------------
  task automatic axi_read(input logic [3:0] a, output logic [31:0] d, output logic [1:0] r);
    @(negedge clk);
    araddr = a; arvalid = 1;
    do @(posedge clk); while (!arready);
    #1 arvalid = 0;
    while (!rvalid) begin @(posedge clk); #1; end
    d = rdata; r = rresp;
    @(posedge clk); #1;
  endtask

  task automatic check_word(input logic [31:0] w);
    tdc_word_t tw;
    exp_t x;
    int sn, pn;
    longint meas;
    tw = tdc_word_t'(w);
    x  = expq.pop_front();
    sn = int'(gray2bin(tw.start_fine));
    pn = int'(gray2bin(tw.stop_fine));
    n_meas++;
    check(tw.pad == 0, "pad bits zero");
    if (!x.near) begin
      check(sn == x.start_n, "start code");
      check(pn == x.stop_n, "stop code");
      check(int'(tw.coarse) == x.coarse, "coarse difference");
      if (sn != x.start_n || pn != x.stop_n || int'(tw.coarse) != x.coarse)
        $display("  word start=%0d/%0d stop=%0d/%0d coarse=%0d/%0d width=%0d",
                 sn, x.start_n, pn, x.stop_n, tw.coarse, x.coarse, x.width_ps);
    end
    meas = longint'(tw.coarse) * PERIOD_PS
         + (cum[sn] + cum[sn+1]) / 2 - (cum[pn] + cum[pn+1]) / 2;
    check(meas - x.width_ps <= 1000 && x.width_ps - meas <= 1000, "reconstructed width");
  endtask

  task automatic drain(input int n);
    logic [31:0] d;
    logic [1:0] r;
    repeat (n) begin
      axi_read(4'h0, d, r);
      check(r == 2'b00, "DATA read OKAY");
      check_word(d);
    end
  endtask

  function automatic longint rand_width(input int kind);
    case (kind)
      0:       return longint'($urandom_range(200, 7999));        // short
      1:       return longint'($urandom_range(8000, 100000));     // medium
      default: return longint'($urandom_range(100000, 1400000));  // long
    endcase
  endfunction

  initial begin
    logic [31:0] d;
    logic [1:0]  r;
    longint off;

    // A: hit high out of reset; its falling edge is a stop with no start.
    hit = 1;
    repeat (3) @(posedge clk);
    #1 nrst = 1;
    repeat (5) @(posedge clk);
    hit = 0;
    repeat (12) @(posedge clk);
    axi_read(4'h4, d, r);
    check(d[0] == 1 && d[31:16] == 0, "stray stop leaves the FIFO empty");

    // B: random pulses of all lengths, some with edges just before a clock edge.
    for (int i = 0; i < 90; i++) begin
      off = (i % 6 == 5) ? longint'(PERIOD_PS - $urandom_range(1, 600))
                         : longint'($urandom_range(1, 7999));
      pulse(off, rand_width(i % 3), 1);
      repeat (12) @(posedge clk);
    end
    axi_read(4'h4, d, r);
    check(d[31:16] == 90, "90 words stored");
    drain(90);

    // C: a second pulse rising before count_reset is issued is not measured.
    for (int i = 0; i < 5; i++) begin
      pulse(longint'($urandom_range(1, 7999)), longint'($urandom_range(8000, 40000)), 1);
      #2;
      pulse(longint'($urandom_range(1, 7999)), longint'($urandom_range(20000, 60000)), 0);
      repeat (12) @(posedge clk);
      axi_read(4'h4, d, r);
      check(d[31:16] == 1, "only the first pulse of a pair is measured");
      if (d[31:16] == 1) n_held++;
      drain(1);
    end

    // D: fill the FIFO past its depth.
    for (int i = 0; i < 512 + 3; i++) begin
      pulse(longint'($urandom_range(1, 7999)), rand_width(i % 2), (i < 512));
      repeat (12) @(posedge clk);
    end
    axi_read(4'h4, d, r);
    check(d[1] == 1 && d[31:16] == 512, "FIFO full with 512 words");
    if (d[1]) n_full++;
    check(n_dropped == 3, "three measurements dropped");
    drain(512);
    axi_read(4'h0, d, r);
    check(r == 2'b10, "empty read answered SLVERR");
    if (r == 2'b10) n_slverr++;
    axi_read(4'h4, d, r);
    check(d[0] == 1, "FIFO empty again");

    check(expq.size() == 0, "every expected word read");
    $display("mechanisms: meas=%0d short=%0d late=%0d long=%0d held=%0d stray=%0d dropped=%0d full=%0d slverr=%0d",
             n_meas, n_short, n_late, n_long, n_held, n_stray, n_dropped, n_full, n_slverr);
    check(n_short > 0, "short pulse exercised");
    check(n_late > 0, "late sample exercised");
    check(n_long > 0, "long pulse exercised");
    check(n_held > 0, "count_reset hold exercised");
    check(n_stray == 1, "stray stop exercised");
    check(n_dropped > 0, "FIFO drop exercised");
    check(n_full > 0, "FIFO full exercised");
    check(n_slverr > 0, "empty read exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
