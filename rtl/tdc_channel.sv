`timescale 1ns/1ps
// tdc_channel: the clocked part of one gray-code oscillator TDC channel.
//
// The oscillator (gray_osc) steps through the 5-bit gray code while its enable
// is high, with no clock involved. This module holds the two register sets
// that sit next to it:
//   * sampled: the first register set, loaded from the oscillator on every
//     rising clock edge. Because only one bit changes per step, the sample is
//     always a valid code, at worst one step off.
//   * store:   the OR of the sampled bits. It rises in the cycle after the
//     first clock edge that finds the oscillator away from zero, and enables
//     the second register set, clears the input stage and samples the coarse
//     counter. It lasts one cycle.
//   * fine:    the second register set, loaded while store is high. It holds
//     the gray code reached between the hit edge and the sampling clock edge.
// A two-state machine follows the channel state machine of the design: IDLE
// covers idle, oscillating and sampling; the store cycle moves it to WAIT,
// where it holds the input stage cleared (clr_req) and keeps the fine value
// until count_reset returns it to IDLE. Folding the design's sample and store
// states into the store cycle is this design's choice.
//
// Timing: hit edge -> (next clock edge) sampled != 0 -> store high for one
// cycle -> (next edge) fine valid, captured high until count_reset.
module tdc_channel
  import tdc_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  gray_t gray_in,      // asynchronous oscillator bits
  input  logic  count_reset,  // end of conversion, ready for the next hit
  output gray_t sampled,      // first register set
  output logic  store,        // enable of the second register set
  output logic  clr_req,      // clears the input stage
  output logic  captured,     // fine holds a measurement
  output gray_t fine          // second register set
);

  typedef enum logic {CH_IDLE, CH_WAIT} ch_state_t;
  ch_state_t state;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sampled <= '0;
    else        sampled <= gray_in;
  end

  assign store = (state == CH_IDLE) && (|sampled);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     fine <= '0;
    else if (store) fine <= sampled;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state <= CH_IDLE;
    else begin
      unique case (state)
        CH_IDLE: if (store)       state <= CH_WAIT;
        CH_WAIT: if (count_reset) state <= CH_IDLE;
        default:                  state <= CH_IDLE;
      endcase
    end
  end

  assign captured = (state == CH_WAIT);
  assign clr_req  = store || captured;

endmodule
