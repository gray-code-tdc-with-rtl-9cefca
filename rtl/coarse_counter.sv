`timescale 1ns/1ps
// coarse_counter: extends the TDC range beyond one clock period.
//
// A binary counter (16 bits by default, as in the design) advances on every
// system clock edge. Each channel's store pulse copies the count into that
// channel's sample register, so start and stop are timestamped in the same
// clock cycle in which their fine values are latched; the merge block then
// subtracts the two. count_reset, issued after each conversion, clears the
// counter and both samples. The design names the signal but does not say what
// it clears; the difference is taken modulo 2^W, so a free-running counter
// would give the same result.
//
// Timing: count, start_val and stop_val are registered; a sample reflects the
// count in the cycle in which its store was high.
module coarse_counter #(
  parameter int unsigned W = tdc_pkg::COARSE_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         count_reset,
  input  logic         store_start,
  input  logic         store_stop,
  output logic [W-1:0] count,
  output logic [W-1:0] start_val,
  output logic [W-1:0] stop_val
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)           count <= '0;
    else if (count_reset) count <= '0;
    else                  count <= count + 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      start_val <= '0;
      stop_val  <= '0;
    end else if (count_reset) begin
      start_val <= '0;
      stop_val  <= '0;
    end else begin
      if (store_start) start_val <= count;
      if (store_stop)  stop_val  <= count;
    end
  end

endmodule
