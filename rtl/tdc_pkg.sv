`timescale 1ns/1ps
// tdc_pkg: widths, the measurement word layout and gray-code helpers shared by
// the gray-code oscillator TDC.
//
// The fine stage is a 5-bit reflected binary (gray) code counter: five is the
// most a 6-input LUT can hold once one input is taken by the enable, giving
// 32 interpolation steps. The coarse counter is 16 bits wide and the merged
// measurement word 32 bits, as the design specifies. How the 26 useful bits
// are placed inside the 32-bit word is this design's choice:
//   [31:26] zero, [25:10] coarse difference, [9:5] stop gray code,
//   [4:0] start gray code.
package tdc_pkg;

  localparam int unsigned GRAY_W   = 5;
  localparam int unsigned COARSE_W = 16;
  localparam int unsigned WORD_W   = 32;
  localparam int unsigned PAD_W    = WORD_W - COARSE_W - 2 * GRAY_W;

  typedef logic [GRAY_W-1:0]   gray_t;
  typedef logic [COARSE_W-1:0] coarse_t;

  typedef struct packed {
    logic [PAD_W-1:0] pad;         // always zero
    coarse_t          coarse;      // stop coarse sample minus start coarse sample
    gray_t            stop_fine;   // raw gray code held by the stop channel
    gray_t            start_fine;  // raw gray code held by the start channel
  } tdc_word_t;

  // Binary count to reflected binary code.
  function automatic gray_t bin2gray(input gray_t b);
    return b ^ (b >> 1);
  endfunction

  // Reflected binary code back to the binary step count.
  function automatic gray_t gray2bin(input gray_t g);
    gray_t b;
    b[GRAY_W-1] = g[GRAY_W-1];
    for (int i = GRAY_W - 2; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  // The code that follows g in the counting sequence (wraps after 31 steps).
  function automatic gray_t gray_next(input gray_t g);
    return bin2gray(gray2bin(g) + 1'b1);
  endfunction

  // Truth table (INIT value) of the 6-input LUT that drives code bit b of the
  // oscillator. The LUT pins are I0 = bit4, I1 = bit3, I2 = bit2, I3 = bit1,
  // I4 = bit0 and I5 = enable, and output O6 = INIT[{I5,I4,I3,I2,I1,I0}].
  // With the enable high the LUT gives bit b of gray_next(code); with it low,
  // zero. The five values are 9669966900000000, 6969FF0000000000,
  // F0F099F000000000, CCCCCC5C00000000 and AAAAAAAC00000000 (hex, bit 0..4).
  function automatic logic [63:0] lut_init(input int unsigned b);
    logic [63:0] init;
    logic [5:0]  a;
    gray_t       c, n;
    init = '0;
    for (int i = 0; i < 64; i++) begin
      a = 6'(i);
      c = {a[0], a[1], a[2], a[3], a[4]};
      n = gray_next(c);
      init[i] = a[5] & n[b];
    end
    return init;
  endfunction

  // Output of a LUT with truth table init for code c and enable en.
  function automatic logic lut_eval(input logic [63:0] init, input gray_t c,
                                    input logic en);
    return init[{en, c[0], c[1], c[2], c[3], c[4]}];
  endfunction

endpackage
