`timescale 1ns/1ps
// gray_osc: behavioural model of the 5-bit gray-code ring oscillator.
//
// This is a behavioural model, not synthesizable logic. In the FPGA the
// oscillator is five 6-input LUTs, one per code bit, each fed with all five
// code bits and the enable, and wired in a loop with no register in between:
// because a gray code changes one bit per step, the loop counts on its own at
// a rate set only by LUT and routing delays, and the sampling clock then reads
// the count. With the enable low every LUT drives zero.
//
// The model evaluates the five LUT truth tables (tdc_pkg::lut_init, with the
// pin order I0 = bit4 ... I4 = bit0, I5 = enable) on the current code; the one
// LUT whose output differs from its bit is the next to switch. This steps
// through the reflected binary sequence 00,01,03,02,06,... while en is high. Each step takes the routing delay from the bit that
// changed last to the LUT that changes next, plus the LUT delay:
//   step delay = ROUTE_PS[last bit][next LUT] + LUT_PS.
// ROUTE_PS defaults to the worst-case routing delays of the manually routed
// oscillator as listed by the design (rows bit0..bit4, columns LUT0..LUT4; the
// unused bit0->LUT0 entry is 0). LUT_PS = 123 ps is the LUT delay obtained by
// subtracting those routes from the simulated step sizes of the start channel
// (999, 600, 809, 704, 814, 832 ps). Only the eight routes between LUT0 and
// the other LUTs ever set a step. HIT_ROUTE_PS, the route from the enable to
// the LUTs, is not given by the design and is this model's assumption; it sets
// the first step and the delay with which the code returns to zero after the
// enable falls.
//
// Interface: en (asynchronous enable from the input stage), code (the five
// LUT outputs).
module gray_osc
  import tdc_pkg::*;
#(
  parameter int unsigned ROUTE_PS [GRAY_W][GRAY_W] = '{
    '{  0, 876, 686, 691, 665},   // from bit0
    '{477, 475, 193, 198, 700},   // from bit1
    '{580, 162, 737, 732, 911},   // from bit2
    '{709, 711, 307, 306, 394},   // from bit3
    '{513, 518, 914, 916, 296}    // from bit4
  },
  parameter int unsigned LUT_PS       = 123,
  parameter int unsigned HIT_ROUTE_PS = 500
) (
  input  logic  en,
  output gray_t code
);

  typedef logic [63:0] lut_init_t;
  lut_init_t lut_tab [GRAY_W];

  int unsigned last_bit;   // bit that changed last, GRAY_W while just enabled
  int unsigned next_bit;
  int unsigned step_ps;

  // Outputs of the five LUTs for the present code with the enable high.
  function automatic gray_t luts(input gray_t c);
    gray_t r;
    for (int b = 0; b < GRAY_W; b++) r[b] = lut_eval(lut_tab[b], c, 1'b1);
    return r;
  endfunction

  // The LUT whose output disagrees with its bit (exactly one in a gray code).
  function automatic int unsigned switching_lut(input gray_t c);
    gray_t d;
    d = luts(c) ^ c;
    for (int b = 0; b < GRAY_W; b++) if (d[b]) return b;
    return 0;
  endfunction

  initial begin
    for (int b = 0; b < GRAY_W; b++) lut_tab[b] = lut_init(b);
    code = '0;
  end

  always begin
    wait (en);
    last_bit = GRAY_W;
    while (en) begin
      next_bit = switching_lut(code);
      if (last_bit == GRAY_W) step_ps = HIT_ROUTE_PS + LUT_PS;
      else                    step_ps = ROUTE_PS[last_bit][next_bit] + LUT_PS;
      fork
        #(real'(step_ps) / 1000.0);
        @(negedge en);
      join_any
      disable fork;
      if (en) begin
        code[next_bit] = lut_eval(lut_tab[next_bit], code, 1'b1);
        last_bit       = next_bit;
      end
    end
    #(real'(HIT_ROUTE_PS + LUT_PS) / 1000.0);
    code = '0;
  end

endmodule
