`timescale 1ns/1ps
// input_stage: arms one gray-code oscillator on an edge of the hit signal.
//
// A flip-flop with its data input tied high is clocked by the hit edge, so its
// output (the oscillator enable, hit_start or hit_stop) rises asynchronously
// the moment the edge arrives, independent of the system clock. It is cleared
// asynchronously when the system is in reset (nrst low) or when the channel it
// feeds asks for it (clr_req). The channel raises clr_req with its store
// signal, which limits the enable to about one clock period as the design
// intends, and keeps it raised until count_reset, so that no further edge is
// accepted while a measurement is being merged; holding the clear during that
// wait is this design's reading of the channel state machine.
//
// The stop channel uses the same module clocked by the inverted hit.
//
// The flip-flop starts at zero, as FPGA flip-flops do after configuration:
// its clear acts on an edge in simulation, and a clear that is already high
// when simulation starts would otherwise leave it at an arbitrary value.
//
// Interface: hit_edge (rising edge arms), nrst (active-low reset),
// clr_req (active-high clear request), en (oscillator enable).
module input_stage (
  input  logic hit_edge,
  input  logic nrst,
  input  logic clr_req,
  output logic en
);

  logic clr;
  logic q = 1'b0;   // power-up value, as FPGA flip-flops are initialised

  assign clr = !nrst || clr_req;

  always_ff @(posedge hit_edge or posedge clr) begin
    if (clr) q <= 1'b0;
    else     q <= 1'b1;
  end

  assign en = q;

endmodule
