// ccm_pkg: constants and types shared by the coincidence-counting module.
//
// The module has four detector inputs (A, B, C, D) and eight coincidence
// channels, each counted by a 16-bit register in the FPGA, which runs from a
// 50 MHz master oscillator. These numbers are the published design's. The
// FPGA can alternatively be built with six 20-bit channels (set NUM_CH = 6 and
// CNT_W = 20 on ccm_top / ccm_fpga).
//
// The counting interval is given in master-clock cycles, 50e6 / R for an
// acquisition rate R between 1 Hz and 50 kHz, so 26 bits hold it.
`timescale 1ns / 1ps
package ccm_pkg;
  localparam int unsigned NUM_IN     = 4;          // detector inputs A..D
  localparam int unsigned NUM_CH     = 8;          // coincidence channels
  localparam int unsigned CNT_W      = 16;         // counting register width
  localparam int unsigned CLK_HZ     = 50_000_000; // master oscillator
  localparam int unsigned PERIOD_W   = 26;         // interval length, cycles
  localparam int unsigned MIN_PERIOD = CLK_HZ / 50_000;  // R = 50 kHz -> 1000
  localparam int unsigned MAX_PERIOD = CLK_HZ;            // R = 1 Hz

  // Pulse-shaper setting, from toggle switches A (msb) and B (lsb).
  typedef enum logic [1:0] {
    SHAPE_SHORT  = 2'b00,  // narrowest pulses
    SHAPE_MEDIUM = 2'b01,
    SHAPE_LONG   = 2'b10,
    SHAPE_BYPASS = 2'b11   // shortening bypassed
  } shape_sel_e;

  // TTL clock output rate, in decades below 10 MHz.
  typedef enum logic [2:0] {
    CLKOUT_10MHZ  = 3'd0,
    CLKOUT_1MHZ   = 3'd1,
    CLKOUT_100KHZ = 3'd2,
    CLKOUT_10KHZ  = 3'd3,
    CLKOUT_1KHZ   = 3'd4,
    CLKOUT_100HZ  = 3'd5,
    CLKOUT_10HZ   = 3'd6,
    CLKOUT_1HZ    = 3'd7
  } clkout_sel_e;
endpackage
