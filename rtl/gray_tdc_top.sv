`timescale 1ns/1ps
// gray_tdc_top: pulse-width measurement unit built on two gray-code
// oscillator TDC channels.
//
// A pulse on hit is measured from its rising to its falling edge. The rising
// edge arms the start input stage, whose output enables the start oscillator;
// the inverted hit does the same for the stop side. Each oscillator counts
// gray code steps of a few hundred picoseconds until the next system clock
// edge samples it; the non-zero sample raises the channel's store, which
// latches the fine code, clears the input stage (so an oscillator never runs
// for more than about one clock period) and samples the 16-bit coarse counter.
// Once both channels hold a value the merge state machine forms one 32-bit
// word (coarse difference, stop code, start code), writes it to the FIFO and
// issues count_reset to re-arm the channels. A processor reads the words over
// AXI4-Lite.
//
// The measured width is
//   T_clk * coarse + t(start_fine) - t(stop_fine)
// where t(code) is the time the oscillator needs to reach that code, known
// from a code density calibration (t is the hit-to-sampling-edge time).
//
// The oscillators are behavioural models (gray_osc): in the FPGA they are
// placed and routed LUT loops whose timing comes from routing, not from RTL.
// The two input stages clock on hit itself, so hit is a clock for them.
//
// Interface: clk (system clock, 125 MHz in the design), nrst (active-low
// asynchronous reset), hit, an AXI4-Lite slave port on clk, and two one-cycle
// event pulses for monitoring (ev_dropped, ev_stray_stop).
module gray_tdc_top
  import tdc_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 512,
  parameter int unsigned AXI_ADDR_W = 4,
  localparam int unsigned LEVEL_W   = $clog2(FIFO_DEPTH) + 1
) (
  input  logic                  clk,
  input  logic                  nrst,
  input  logic                  hit,
  input  logic [AXI_ADDR_W-1:0] s_axi_awaddr,
  input  logic [2:0]            s_axi_awprot,
  input  logic                  s_axi_awvalid,
  output logic                  s_axi_awready,
  input  logic [WORD_W-1:0]     s_axi_wdata,
  input  logic [WORD_W/8-1:0]   s_axi_wstrb,
  input  logic                  s_axi_wvalid,
  output logic                  s_axi_wready,
  output logic [1:0]            s_axi_bresp,
  output logic                  s_axi_bvalid,
  input  logic                  s_axi_bready,
  input  logic [AXI_ADDR_W-1:0] s_axi_araddr,
  input  logic [2:0]            s_axi_arprot,
  input  logic                  s_axi_arvalid,
  output logic                  s_axi_arready,
  output logic [WORD_W-1:0]     s_axi_rdata,
  output logic [1:0]            s_axi_rresp,
  output logic                  s_axi_rvalid,
  input  logic                  s_axi_rready,
  output logic                  ev_dropped,     // a word was lost to a full FIFO
  output logic                  ev_stray_stop   // a stop without start was discarded
);

  logic      hit_n;
  logic      hit_start, hit_stop;
  gray_t     start_gray, stop_gray;
  gray_t     start_fine, stop_fine;
  logic      start_store, stop_store;
  logic      start_clr, stop_clr;
  logic      start_captured, stop_captured;
  logic      count_reset;
  coarse_t   start_coarse, stop_coarse;
  logic      fifo_wr, fifo_rd, fifo_empty, fifo_full;
  tdc_word_t fifo_wdata;
  logic [WORD_W-1:0]  fifo_rdata;
  logic [LEVEL_W-1:0] fifo_level;

  assign hit_n = !hit;

  // Start side: rising edge of hit.
  input_stage u_in_start (
    .hit_edge(hit), .nrst, .clr_req(start_clr), .en(hit_start)
  );
  gray_osc u_osc_start (.en(hit_start), .code(start_gray));
  tdc_channel u_ch_start (
    .clk, .rst_n(nrst), .gray_in(start_gray), .count_reset,
    .sampled(), .store(start_store), .clr_req(start_clr),
    .captured(start_captured), .fine(start_fine)
  );

  // Stop side: falling edge of hit.
  input_stage u_in_stop (
    .hit_edge(hit_n), .nrst, .clr_req(stop_clr), .en(hit_stop)
  );
  gray_osc u_osc_stop (.en(hit_stop), .code(stop_gray));
  tdc_channel u_ch_stop (
    .clk, .rst_n(nrst), .gray_in(stop_gray), .count_reset,
    .sampled(), .store(stop_store), .clr_req(stop_clr),
    .captured(stop_captured), .fine(stop_fine)
  );

  coarse_counter u_coarse (
    .clk, .rst_n(nrst), .count_reset,
    .store_start(start_store), .store_stop(stop_store),
    .count(), .start_val(start_coarse), .stop_val(stop_coarse)
  );

  tdc_merge u_merge (
    .clk, .rst_n(nrst), .hit,
    .start_captured, .stop_captured, .start_fine, .stop_fine,
    .start_coarse, .stop_coarse, .fifo_full,
    .fifo_wr, .fifo_wdata, .count_reset,
    .dropped(ev_dropped), .stray_stop(ev_stray_stop)
  );

  sync_fifo #(.WIDTH(WORD_W), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n(nrst), .wr_en(fifo_wr), .wdata(fifo_wdata),
    .rd_en(fifo_rd), .rdata(fifo_rdata), .empty(fifo_empty),
    .full(fifo_full), .level(fifo_level)
  );

  axi_lite_slave #(.ADDR_W(AXI_ADDR_W), .DATA_W(WORD_W), .LEVEL_W(LEVEL_W)) u_axi (
    .aclk(clk), .aresetn(nrst),
    .s_awaddr(s_axi_awaddr), .s_awprot(s_axi_awprot), .s_awvalid(s_axi_awvalid),
    .s_awready(s_axi_awready), .s_wdata(s_axi_wdata), .s_wstrb(s_axi_wstrb),
    .s_wvalid(s_axi_wvalid), .s_wready(s_axi_wready), .s_bresp(s_axi_bresp),
    .s_bvalid(s_axi_bvalid), .s_bready(s_axi_bready),
    .s_araddr(s_axi_araddr), .s_arprot(s_axi_arprot), .s_arvalid(s_axi_arvalid),
    .s_arready(s_axi_arready), .s_rdata(s_axi_rdata), .s_rresp(s_axi_rresp),
    .s_rvalid(s_axi_rvalid), .s_rready(s_axi_rready),
    .fifo_rdata, .fifo_empty, .fifo_full, .fifo_level, .fifo_rd
  );

endmodule
