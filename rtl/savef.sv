// savef: frequency capture of the modified divider.
//
// On each synchronised reference edge (ref_rise, CLK[0] domain) while the loop
// is in frequency acquisition, the number of CLK[0] cycles of the reference
// period that just ended (the running divider count plus the current edge) is
// stored in f_meas.  f_meas is the F that the loop control uses for its
// feed-forward prediction and holds its value between captures.
// Timing: registered on CLK[0]; f_meas changes three CLK[0] cycles after a
// reference edge and is stable for the rest of the reference period.  Saving
// the divider count on reference edges follows the described design; the
// +1 correction and the register width are this design's own.
`timescale 1ns / 1fs
module savef #(
  parameter int CNT_W = adpll_pkg::CNT_W
) (
  input  logic             clk0,
  input  logic             rst_n,
  input  logic             capture,
  input  logic [CNT_W-1:0] count,
  output logic [CNT_W-1:0] f_meas
);
  always_ff @(posedge clk0 or negedge rst_n)
    if (!rst_n)       f_meas <= '0;
    else if (capture) f_meas <= count + CNT_W'(1);
endmodule
