// reset_syn: reference-edge synchroniser and mode control of the modified divider.
//
// The reference clock is brought into the DCO (CLK[0]) domain through two
// flip-flops; a third flip-flop turns its rising edge into a one-cycle pulse,
// ref_rise, seen at the third CLK[0] edge after the reference edge.  On each
// pulse the frequency-acquisition request fa_mode from the loop control is
// sampled into mode_q.
//   cnt_clear : in frequency acquisition, restart the divider count on every
//               reference edge (the count of the elapsed period is saved first)
//   cnt_align : on the first reference edge after fa_mode falls, load the
//               divider with ALIGN so that its output starts in phase with the
//               reference; ALIGN = 2 makes up for the synchroniser delay
//   reset_div : holds the PFD cleared until the divider has been aligned
//   zero      : the ref_rise pulse itself, which clears the T2D and P2D
//               counters before the next phase-error window
// Timing: all outputs are registered or decoded in the CLK[0] domain; rst_n is
// asynchronous, active low.  That a Reset_syn block restarts the divider and
// leaves the loop control time to retune the DCO follows the described design;
// the synchroniser and the alignment preset are this design's own.
`timescale 1ns / 1fs
module reset_syn (
  input  logic clk0,
  input  logic rst_n,
  input  logic ref_clk,
  input  logic fa_mode,
  output logic ref_rise,
  output logic cnt_clear,
  output logic cnt_align,
  output logic reset_div,
  output logic zero
);
  logic s1, s2, s3;
  logic mode_q;

  always_ff @(posedge clk0 or negedge rst_n)
    if (!rst_n) begin
      s1 <= 1'b0; s2 <= 1'b0; s3 <= 1'b0;
      mode_q <= 1'b1;
    end else begin
      s1 <= ref_clk;
      s2 <= s1;
      s3 <= s2;
      if (ref_rise) mode_q <= fa_mode;
    end

  assign ref_rise  = s2 & ~s3;
  assign cnt_clear = ref_rise & fa_mode;
  assign cnt_align = ref_rise & ~fa_mode & mode_q;
  assign reset_div = mode_q;
  assign zero      = ref_rise;
endmodule
