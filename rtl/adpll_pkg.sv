// adpll_pkg: widths and default constants shared by the ADPLL blocks.
//
// The loop runs in two clock domains: the reference clock (loop control and
// loop filter) and the DCO's phase-0 clock (divider, frequency counter and
// time-to-digital counter).  The DCO delivers NPH = 5 equally spaced phases, so
// the finest phase step the P2D can resolve is one fifth of a DCO period.
// The P2D output width (6 bits) and the phase count (5) follow the described
// design; the code, counter and divider widths are this design's own choice.
`timescale 1ns / 1fs
package adpll_pkg;
  localparam int NPH    = 5;   // DCO phases CLK[4:0]
  localparam int CODE_W = 10;  // DCO control word width
  localparam int CNT_W  = 10;  // divider / frequency counter width
  localparam int N_W    = 10;  // divider-ratio width
  localparam int PC_W   = 2;   // coarse T2D count width (P<1:0>)
  localparam int P1_W   = 6;   // P2D output width (P1<5:0>)
endpackage
