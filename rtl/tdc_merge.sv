`timescale 1ns/1ps
// tdc_merge: the TDC state machine and the merge of one measurement.
//
// It follows the TDC IP state machine of the design:
//   IDLE        -> MEASURING   when the start channel has captured a hit
//   MEASURING   -> MERGE       when the stop channel has captured a hit
//   MERGE       -> STORE       when the word is formed (end of conversion)
//   STORE       -> COUNT_RESET after one FIFO write
//   COUNT_RESET -> IDLE        once hit is low, issuing count_reset
// In MERGE the coarse difference (stop sample minus start sample, modulo
// 2^16) is concatenated with both raw gray codes into the 32-bit word of
// tdc_pkg::tdc_word_t; this takes one cycle. In STORE the word is written to
// the FIFO; if the FIFO is full the word is dropped, as the state machine
// leaves STORE unconditionally. count_reset is held back while hit is high so
// that a channel is never re-armed in the middle of a pulse.
//
// This design's own choices: the state machine moves on the channels'
// captured levels rather than on the asynchronous hit_start/stop_store events
// (the same events, seen in the clock domain); hit is brought into the clock
// domain by two flip-flops; and a stop captured while IDLE (a falling edge
// with no rising edge before it, possible only when hit is high out of reset)
// is discarded through COUNT_RESET instead of blocking the stop channel.
//
// Interface: channel status and values in, FIFO write port and count_reset
// out. Timing: count_reset follows the stop capture after at least 4 cycles.
module tdc_merge
  import tdc_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      hit,            // asynchronous hit input
  input  logic      start_captured,
  input  logic      stop_captured,
  input  gray_t     start_fine,
  input  gray_t     stop_fine,
  input  coarse_t   start_coarse,
  input  coarse_t   stop_coarse,
  input  logic      fifo_full,
  output logic      fifo_wr,
  output tdc_word_t fifo_wdata,
  output logic      count_reset,
  output logic      dropped,        // pulse: a word was lost to a full FIFO
  output logic      stray_stop      // pulse: a stop without start was discarded
);

  typedef enum logic [2:0] {
    S_IDLE, S_MEASURING, S_MERGE, S_STORE, S_COUNT_RESET
  } state_t;

  state_t     state;
  logic [1:0] hit_sync;
  logic       end_of_conversion;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) hit_sync <= '0;
    else        hit_sync <= {hit_sync[0], hit};
  end

  // The word is registered in MERGE, so the conversion ends after that cycle.
  assign end_of_conversion = (state == S_MERGE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) fifo_wdata <= '0;
    else if (state == S_MERGE) begin
      fifo_wdata.pad        <= '0;
      fifo_wdata.coarse     <= stop_coarse - start_coarse;
      fifo_wdata.stop_fine  <= stop_fine;
      fifo_wdata.start_fine <= start_fine;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state <= S_IDLE;
    else begin
      unique case (state)
        S_IDLE:
          if (start_captured)     state <= S_MEASURING;
          else if (stop_captured) state <= S_COUNT_RESET;
        S_MEASURING:   if (stop_captured)     state <= S_MERGE;
        S_MERGE:       if (end_of_conversion) state <= S_STORE;
        S_STORE:                              state <= S_COUNT_RESET;
        S_COUNT_RESET: if (!hit_sync[1])      state <= S_IDLE;
        default:                              state <= S_IDLE;
      endcase
    end
  end

  assign fifo_wr     = (state == S_STORE);
  assign dropped     = fifo_wr && fifo_full;
  assign count_reset = (state == S_COUNT_RESET) && !hit_sync[1];
  assign stray_stop  = (state == S_IDLE) && !start_captured && stop_captured;

endmodule
