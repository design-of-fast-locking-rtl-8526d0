// t2d: coarse time-to-digital converter of the modified divider.
//
// Counts the rising edges of CLK[0] that fall inside the phase-error pulse
// p_error of the PFD, saturating at 2**PC_W-1, and keeps the sign of the error
// (lead = 1 when the reference fell first, i.e. the divided clock lags and the
// DCO must speed up).  The count is the coarse part of the phase error, P<1:0>,
// which the P2D refines with the other four DCO phases.
// Interface: p_cnt is cleared synchronously by zero (one CLK[0] cycle after
// each reference edge); lead is captured on the rising edge of p_error.
// The block is described as re-sampling the error on the falling clock edge;
// here the pulse is sampled directly on the rising edge, the same edge the
// P2D counters use, so that all five phase counts cover the same window.
`timescale 1ns / 1fs
module t2d #(
  parameter int PC_W = adpll_pkg::PC_W
) (
  input  logic            clk0,
  input  logic            rst_n,
  input  logic            zero,
  input  logic            p_error,
  input  logic            up,
  output logic [PC_W-1:0] p_cnt,
  output logic            lead
);
  always_ff @(posedge clk0 or negedge rst_n)
    if (!rst_n)                  p_cnt <= '0;
    else if (zero)               p_cnt <= '0;
    else if (p_error && !(&p_cnt)) p_cnt <= p_cnt + PC_W'(1);

  always_ff @(posedge p_error or negedge rst_n)
    if (!rst_n) lead <= 1'b0;
    else        lead <= up;
endmodule
