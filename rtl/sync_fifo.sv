`timescale 1ns/1ps
// sync_fifo: single-clock FIFO holding the merged measurement words.
//
// The design buffers measurements in a FIFO between the merge block and the
// processor interface but gives neither its depth nor its type. This one is a
// plain circular buffer of DEPTH words (512 by default, one 7-series 18 Kb
// block RAM at 32/36 bits, an assumed size) with read and write pointers one
// bit wider than the address, so full and empty are told apart by the extra
// bit. Reads are first-word-fall-through: rdata shows the oldest word while
// empty is low, and rd_en removes it. A write into a full FIFO and a read from
// an empty one are ignored.
//
// Timing: a written word appears on rdata in the next cycle; level counts the
// stored words.
module sync_fifo #(
  parameter int unsigned WIDTH = tdc_pkg::WORD_W,
  parameter int unsigned DEPTH = 512,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wdata,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rdata,
  output logic             empty,
  output logic             full,
  output logic [AW:0]      level
);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0]      wptr, rptr;
  logic             do_wr, do_rd;

  assign do_wr = wr_en && !full;
  assign do_rd = rd_en && !empty;

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr[AW-1:0]] <= wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr <= '0;
      rptr <= '0;
    end else begin
      if (do_wr) wptr <= wptr + 1'b1;
      if (do_rd) rptr <= rptr + 1'b1;
    end
  end

  assign rdata = mem[rptr[AW-1:0]];
  assign level = wptr - rptr;
  assign empty = (wptr == rptr);
  assign full  = (wptr[AW-1:0] == rptr[AW-1:0]) && (wptr[AW] != rptr[AW]);

endmodule
