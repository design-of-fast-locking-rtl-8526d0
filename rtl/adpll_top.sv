// adpll_top: fast-locking all-digital PLL with feed-forward compensation.
//
// Loop: the DCO's phase CLK[0] drives the modified divider (MD).  After reset
// the loop control (LC) runs the feed-forward algorithm: two trial codes, two
// frequency counts from the MD, a predicted code W for the divider ratio n_div.
// W is loaded into the loop filter (FDLPF) and the MD aligns the divided clock
// to the reference.  From then on the PFD inside the MD measures the phase error
// between the falling edges of ref_clk and div_clk; the MD's T2D counts it in
// DCO periods, the P2D refines it to a fifth of a period with CLK[4:1], and the
// FDLPF turns it into the next DCO code once per reference cycle.
// Interface: ref_clk, rst_n (async, active low), run (high stops the DCO, the
// loop's off state), n_div (divider ratio / channel) in; the five DCO phases,
// the divided clock and observation outputs (code, f_meas, p1, lead, p_error,
// up, dn, reset_div, fa_mode, locked, kf) out.  The block set and the way they connect follow the described
// design; the DCO is a behavioural model of an analog part.
`timescale 1ns / 1fs
module adpll_top
  import adpll_pkg::*;
#(
  parameter int  FRAC = 4,
  parameter int  KP   = 48,
  parameter int  KI   = 8,
  parameter int  W1   = 896,
  parameter int  W2   = 128
) (
  input  logic                ref_clk,
  input  logic                rst_n,
  input  logic                run,
  input  logic [N_W-1:0]      n_div,
  output logic [NPH-1:0]      clk_out,
  output logic                div_clk,
  output logic [CODE_W-1:0]   code,
  output logic [CNT_W-1:0]    f_meas,
  output logic [P1_W-1:0]     p1,
  output logic                lead,
  output logic                p_error,
  output logic                up,
  output logic                dn,
  output logic                reset_div,
  output logic                fa_mode,
  output logic                locked,
  output logic signed [31:0]  kf
);
  logic              zero, sel;
  logic [PC_W-1:0]   p_cnt;
  logic [CODE_W-1:0] w_lc;

  dco u_dco (.code, .run, .clk(clk_out));

  md u_md (
    .clk0(clk_out[0]), .rst_n, .ref_clk, .n_div, .fa_mode,
    .div_clk, .f_meas, .up, .dn, .p_error, .p_cnt, .lead, .zero, .reset_div
  );

  p2d u_p2d (
    .p(p_cnt), .clk1(clk_out[1]), .clk2(clk_out[2]), .clk3(clk_out[3]),
    .clk4(clk_out[4]), .five(4'd5), .p_error, .zero, .p1
  );

  fdlpf #(.FRAC(FRAC), .KP(KP), .KI(KI), .INIT_CODE(W1)) u_fdlpf (
    .ref_clk, .rst_n, .p1, .lead, .w_lc, .sel, .code
  );

  lc #(.W1(W1), .W2(W2)) u_lc (
    .ref_clk, .rst_n, .n_div, .f_meas, .w_lc, .sel, .fa_mode, .locked, .kf
  );
endmodule
