// p2d: phase-to-digital converter.
//
// Refines the coarse phase error of the divider to one fifth of a DCO period.
// Four 2-bit counters, clocked by the rising edges of DCO phases CLK[1]..CLK[4],
// count while p_error is high, just as the T2D counts CLK[0] into p (P<1:0>).
// Each phase k lies k/5 of a period after CLK[0], so its count differs from p by
// -1, 0 or +1; four comparators form that difference from the two low bits.
// The result is
//     P1 = five * p + sum_k (cnt_k - p)
// which equals the total number of rising edges of all five phases inside the
// pulse, i.e. the pulse width in units of T_DCO/5.  P1 is registered on the
// falling edge of p_error and, like the counters, cleared by zero.
// Interface: p (coarse count), clk1..clk4, five (multiplier operand, tied to 5
// by the top), p_error, zero in; p1 out (unsigned, P1<5:0>).
// Timing: p1 is valid from the end of the error pulse until the next zero.
// The counters, comparators, multiply-by-five and adders and the pin list
// follow the described design; reading a comparator as a signed two-bit
// difference and the falling-edge output register are this design's choice.
`timescale 1ns / 1fs
module p2d #(
  parameter int PC_W = adpll_pkg::PC_W,
  parameter int P1_W = adpll_pkg::P1_W
) (
  input  logic [PC_W-1:0] p,
  input  logic            clk1,
  input  logic            clk2,
  input  logic            clk3,
  input  logic            clk4,
  input  logic [3:0]      five,
  input  logic            p_error,
  input  logic            zero,
  output logic [P1_W-1:0] p1
);
  logic [3:0]      clk_ph;
  logic [1:0]      cnt [4];
  logic [1:0]      diff [4];
  logic [P1_W+1:0] sum;

  assign clk_ph = {clk4, clk3, clk2, clk1};

  for (genvar k = 0; k < 4; k++) begin : g_ph
    logic [1:0] c;
    always_ff @(posedge clk_ph[k] or posedge zero)
      if (zero)         c <= '0;
      else if (p_error) c <= c + 2'd1;
    assign cnt[k] = c;
    // comparator: 2'b11 = one edge fewer, 2'b00 = equal, 2'b01 = one more
    assign diff[k] = cnt[k] - p[1:0];
  end

  always_comb begin
    sum = (P1_W+2)'(p) * (P1_W+2)'(five);
    for (int k = 0; k < 4; k++)
      sum = sum + {{P1_W{diff[k][1]}}, diff[k]};
  end

  always_ff @(negedge p_error or posedge zero)
    if (zero)                  p1 <= '0;
    else if (sum[P1_W+1])      p1 <= '0;               // cannot happen for a valid window
    else if (sum[P1_W])        p1 <= '1;
    else                       p1 <= sum[P1_W-1:0];
endmodule
