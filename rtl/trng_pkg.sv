`timescale 1ps/1ps
// trng_pkg: numbers shared by the ADPLL-based TRNG and its testbenches.
//
// The ADPLL constants K, M and N and the centre frequency f0 are the ones the
// design is specified with; the clock periods follow from them:
//   K clock  = M  * f0 = 16 * 50 MHz = 800 MHz
//   ID clock = 2N * f0 =  2 * 8 * 50 MHz = 800 MHz
//   IDout    = N  * f0 = 400 MHz nominal, divided by N back to f0.
// The system clock of the FPGA board is 100 MHz. The pulse-generator period is
// this design's own choice.
package trng_pkg;
  localparam int unsigned ADPLL_K      = 4;    // K counter modulus
  localparam int unsigned ADPLL_M      = 16;   // K clock = M * f0
  localparam int unsigned ADPLL_N      = 8;    // feedback divider, ID clock = 2N * f0
  localparam int unsigned F0_MHZ       = 50;   // ADPLL centre frequency
  localparam int unsigned SYS_CLK_MHZ  = 100;  // board clock
  localparam int unsigned PULSE_PERIOD = 4;    // ring restart period, system clocks (own choice)
  localparam int unsigned PULSE_WIDTH  = 1;    // ring hold time, system clocks (own choice)

  // Clock periods in picoseconds, for testbenches.
  localparam int unsigned SYS_CLK_PS = 1_000_000 / SYS_CLK_MHZ;           // 10000
  localparam int unsigned DCO_CLK_PS = 1_000_000 / (2 * ADPLL_N * F0_MHZ); // 1250
endpackage
