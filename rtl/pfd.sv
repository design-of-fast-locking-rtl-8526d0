// pfd: phase/frequency detector.
//
// Two set-only flip-flops, one clocked by the falling edge of the reference
// clock and one by the falling edge of the divided clock.  Whichever input falls
// first raises its flag (up for the reference, dn for the divided clock); when
// both flags are high their AND resets both through an OR gate whose other
// input is reset_div, which holds the detector cleared while the loop is in
// frequency acquisition.  The XOR of up and dn is the phase-error pulse: it is
// high for exactly the time between the two falling edges.
//
// Interface: ref_clk, div_clk, reset_div (active high) in; up, dn, p_error out.
// Timing: asynchronous; the pulse width is the phase difference, the reset path
// has zero delay in simulation.  The structure (two D flip-flops with D tied
// high, AND/OR reset, XOR output, falling-edge clocks) follows the described
// design.  The AND-to-reset path is a deliberate asynchronous feedback loop:
// that is how a PFD works, and a lint tool may report it as a loop.
`timescale 1ns / 1fs
module pfd (
  input  logic ref_clk,
  input  logic div_clk,
  input  logic reset_div,
  output logic up,
  output logic dn,
  output logic p_error
);
  logic rst;

  assign rst = (up & dn) | reset_div;

  always_ff @(negedge ref_clk or posedge rst)
    if (rst) up <= 1'b0;
    else     up <= 1'b1;

  always_ff @(negedge div_clk or posedge rst)
    if (rst) dn <= 1'b0;
    else     dn <= 1'b1;

  assign p_error = up ^ dn;
endmodule
