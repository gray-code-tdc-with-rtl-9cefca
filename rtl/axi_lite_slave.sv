`timescale 1ns/1ps
// axi_lite_slave: AXI4-Lite register port through which a processor reads the
// measurement FIFO.
//
// The design connects the TDC to the processor over AXI4-Lite but does not
// give a register map; this one is the smallest that serves the FIFO:
//   0x0 DATA   read: the oldest measurement word, removed from the FIFO by the
//              read. Reading an empty FIFO returns 0 with a SLVERR response.
//   0x4 STATUS read: [0] FIFO empty, [1] FIFO full, [31:16] FIFO level.
// Other read addresses return 0 with OKAY. There are no writable registers:
// writes are accepted and answered OKAY without effect. One read and one
// write may be outstanding at a time.
//
// Timing: AR is accepted when no read response is pending and R follows in the
// next cycle; AW and W are accepted together and B follows in the next cycle.
module axi_lite_slave #(
  parameter int unsigned ADDR_W  = 4,
  parameter int unsigned DATA_W  = tdc_pkg::WORD_W,
  parameter int unsigned LEVEL_W = 10
) (
  input  logic               aclk,
  input  logic               aresetn,
  // write address / data / response
  input  logic [ADDR_W-1:0]  s_awaddr,
  input  logic [2:0]         s_awprot,
  input  logic               s_awvalid,
  output logic               s_awready,
  input  logic [DATA_W-1:0]  s_wdata,
  input  logic [DATA_W/8-1:0] s_wstrb,
  input  logic               s_wvalid,
  output logic               s_wready,
  output logic [1:0]         s_bresp,
  output logic               s_bvalid,
  input  logic               s_bready,
  // read address / data
  input  logic [ADDR_W-1:0]  s_araddr,
  input  logic [2:0]         s_arprot,
  input  logic               s_arvalid,
  output logic               s_arready,
  output logic [DATA_W-1:0]  s_rdata,
  output logic [1:0]         s_rresp,
  output logic               s_rvalid,
  input  logic               s_rready,
  // FIFO side
  input  logic [DATA_W-1:0]  fifo_rdata,
  input  logic               fifo_empty,
  input  logic               fifo_full,
  input  logic [LEVEL_W-1:0] fifo_level,
  output logic               fifo_rd
);

  localparam logic [1:0] RESP_OKAY   = 2'b00;
  localparam logic [1:0] RESP_SLVERR = 2'b10;
  localparam logic [ADDR_W-1:0] ADDR_DATA   = 'h0;
  localparam logic [ADDR_W-1:0] ADDR_STATUS = 'h4;

  logic ar_hs, aw_hs;
  logic [DATA_W-1:0] status_word;

  assign s_arready = !s_rvalid;
  assign ar_hs     = s_arvalid && s_arready;

  // Write channel: accept address and data together, answer OKAY.
  assign s_awready = !s_bvalid && s_awvalid && s_wvalid;
  assign s_wready  = s_awready;
  assign aw_hs     = s_awready;

  always_comb begin
    status_word        = '0;
    status_word[0]     = fifo_empty;
    status_word[1]     = fifo_full;
    status_word[31:16] = 16'(fifo_level);
  end

  assign fifo_rd = ar_hs && (s_araddr == ADDR_DATA) && !fifo_empty;

  always_ff @(posedge aclk or negedge aresetn) begin
    if (!aresetn) begin
      s_rvalid <= 1'b0;
      s_rdata  <= '0;
      s_rresp  <= RESP_OKAY;
    end else if (ar_hs) begin
      s_rvalid <= 1'b1;
      unique case (s_araddr)
        ADDR_DATA: begin
          s_rdata <= fifo_empty ? '0 : fifo_rdata;
          s_rresp <= fifo_empty ? RESP_SLVERR : RESP_OKAY;
        end
        ADDR_STATUS: begin
          s_rdata <= status_word;
          s_rresp <= RESP_OKAY;
        end
        default: begin
          s_rdata <= '0;
          s_rresp <= RESP_OKAY;
        end
      endcase
    end else if (s_rvalid && s_rready) begin
      s_rvalid <= 1'b0;
    end
  end

  always_ff @(posedge aclk or negedge aresetn) begin
    if (!aresetn) begin
      s_bvalid <= 1'b0;
      s_bresp  <= RESP_OKAY;
    end else if (aw_hs) begin
      s_bvalid <= 1'b1;
      s_bresp  <= RESP_OKAY;
    end else if (s_bready) begin
      s_bvalid <= 1'b0;
    end
  end

  // A response stays valid, and unchanged, until it is taken.
  property p_hold_r;
    @(posedge aclk) disable iff (!aresetn)
      s_rvalid && !s_rready |=> s_rvalid && $stable(s_rdata) && $stable(s_rresp);
  endproperty
  property p_hold_b;
    @(posedge aclk) disable iff (!aresetn)
      s_bvalid && !s_bready |=> s_bvalid;
  endproperty
  a_hold_r: assert property (p_hold_r);
  a_hold_b: assert property (p_hold_b);

endmodule
