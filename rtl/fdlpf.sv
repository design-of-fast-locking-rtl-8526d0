// fdlpf: first-order digital loop filter (proportional + integral).
//
// The unsigned phase error p1 (units of T_DCO/5) is given its sign by the
// inverse block: +p1 when the reference leads (lead = 1, DCO too slow), -p1
// otherwise.  One adder accumulates KI*e into the integral path; the other adds
// the proportional term KP*e and forms the registered output code.  When sel is
// high the multiplexer loads the code predicted by the loop control, w_lc, into
// the integral path and onto the output instead.
//     I[n+1] = sel ? w_lc : I[n] + KI*e
//     code   = sel ? w_lc : clamp(I[n+1] + KP*e)
// KP and KI are the filter's two parameters, fixed point with FRAC fraction
// bits; the integral keeps FRAC fraction bits, the output is rounded down and
// clamped to the code range.
// Interface: ref_clk, rst_n (async, active low), p1, lead, w_lc, sel in; code
// out.  Timing: one update per rising reference edge; code is registered.
// Two adders, a multiplexer and an inverse block follow the described design;
// the gains, widths and reset value are this design's own.
`timescale 1ns / 1fs
module fdlpf #(
  parameter int CODE_W    = adpll_pkg::CODE_W,
  parameter int P1_W      = adpll_pkg::P1_W,
  parameter int FRAC      = 4,
  parameter int KP        = 48,   // 3.0 codes per T_DCO/5
  parameter int KI        = 8,    // 0.5 codes per T_DCO/5
  parameter int INIT_CODE = 512
) (
  input  logic              ref_clk,
  input  logic              rst_n,
  input  logic [P1_W-1:0]   p1,
  input  logic              lead,
  input  logic [CODE_W-1:0] w_lc,
  input  logic              sel,
  output logic [CODE_W-1:0] code
);
  localparam int AW = CODE_W + FRAC + 4;
  localparam logic signed [AW-1:0] IMAX = AW'(((1 << CODE_W) - 1) << FRAC);

  logic signed [AW-1:0] integ, integ_sum, integ_next, out_sum;
  logic signed [P1_W:0] e;

  assign e = lead ? $signed({1'b0, p1}) : -$signed({1'b0, p1});

  always_comb begin
    integ_sum = integ + AW'(KI) * AW'(e);
    if (integ_sum < 0)         integ_next = '0;
    else if (integ_sum > IMAX) integ_next = IMAX;
    else                       integ_next = integ_sum;
    out_sum = integ_next + AW'(KP) * AW'(e);
  end

  always_ff @(posedge ref_clk or negedge rst_n)
    if (!rst_n) begin
      integ <= AW'(INIT_CODE << FRAC);
      code  <= CODE_W'(INIT_CODE);
    end else if (sel) begin
      integ <= AW'({w_lc, FRAC'(0)});
      code  <= w_lc;
    end else begin
      integ <= integ_next;
      if (out_sum < 0)         code <= '0;
      else if (out_sum > IMAX) code <= '1;
      else                     code <= CODE_W'(out_sum >>> FRAC);
    end
endmodule
