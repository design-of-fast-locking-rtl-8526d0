// lc: loop control with feed-forward frequency compensation.
//
// Predicts the DCO code for the wanted frequency from two trial measurements,
// so that the feedback loop only has to remove a small residual error.
// Sequence, one step per rising reference edge after reset:
//   the DCO runs at code W1 during reference cycle 1 and at W2 during cycle 3;
//   the divider reports F1 and F2, the DCO cycles counted in those periods;
//   Kf = (W1 - W2) / (F1 - F2)              (codes per DCO cycle per ref cycle)
//   W  = W1 + Kf * (N - F1)                 (predicted code for ratio N)
// W is then loaded into the loop filter's integral path (sel = 1), fa_mode is
// dropped so the divider aligns to the reference and the phase loop starts,
// and locked goes high.  If n_div changes later (a channel switch, the known
// disturbance feed-forward compensation is for), a new W is predicted from the
// stored Kf, F1 and W1 without new measurements, and the alignment is repeated.
// Datapath: four adders (dW, dF, dN, W1 + correction), one multiplier and one
// divider; Kf has KF_FRAC fraction bits and the prediction is rounded and
// clamped to the code range.
// Interface: ref_clk, rst_n (async, active low), n_div, f_meas in; w_lc, sel,
// fa_mode, locked, kf out.  Timing: W is on w_lc five reference edges after
// reset and the phase loop runs from the seventh.  The algorithm, the reading of
// F1/W1 in the first and F2/W2 in the third reference cycle and the
// adder/multiplier/divider datapath follow the described design; the trial
// codes, the fixed-point format and the channel-switch path are this design's.
`timescale 1ns / 1fs
module lc #(
  parameter int CODE_W  = adpll_pkg::CODE_W,
  parameter int CNT_W   = adpll_pkg::CNT_W,
  parameter int N_W     = adpll_pkg::N_W,
  parameter int KF_FRAC = 8,
  parameter int W1      = 896,
  parameter int W2      = 128
) (
  input  logic              ref_clk,
  input  logic              rst_n,
  input  logic [N_W-1:0]    n_div,
  input  logic [CNT_W-1:0]  f_meas,
  output logic [CODE_W-1:0] w_lc,
  output logic              sel,
  output logic              fa_mode,
  output logic              locked,
  output logic signed [31:0] kf
);
  typedef enum logic [2:0] {
    S_RUN_W1, S_SET_W2, S_GET_F1, S_RUN_W2, S_GET_F2, S_PREDICT, S_LOAD, S_TRACK
  } state_t;

  // datapath widths: numerator of the division, its divisor, the quotient
  // and the product, each just wide enough for the extreme operands
  localparam int NUMW = CODE_W + KF_FRAC + 2;
  localparam int DENW = CNT_W + 2;
  localparam int PRW  = NUMW + DENW;
  localparam logic signed [PRW-1:0] CMAX = PRW'((1 << CODE_W) - 1);

  state_t                 state;
  logic [CNT_W-1:0]       f1, f2;
  logic [N_W-1:0]         n_q;
  logic signed [NUMW-1:0] d_w, kf_w;
  logic signed [DENW-1:0] d_f, d_n;
  logic signed [PRW-1:0]  corr, w_pred_w;
  logic [CODE_W-1:0]      w_pred;

  // feed-forward datapath
  always_comb begin
    d_w  = NUMW'(W1 - W2) <<< KF_FRAC;
    d_f  = $signed({2'b00, f1}) - $signed({2'b00, f2});
    d_n  = $signed(DENW'(n_div)) - $signed({2'b00, f1});
    kf_w = (d_f == '0) ? '0 : d_w / NUMW'(d_f);
    corr = PRW'(kf_w) * PRW'(d_n);
    w_pred_w = PRW'(W1) + ((corr + PRW'(1 << (KF_FRAC - 1))) >>> KF_FRAC);
    if (w_pred_w < 0)         w_pred = '0;
    else if (w_pred_w > CMAX) w_pred = '1;
    else                      w_pred = CODE_W'(w_pred_w);
  end

  assign kf = 32'(kf_w);

  always_ff @(posedge ref_clk or negedge rst_n)
    if (!rst_n) begin
      state   <= S_RUN_W1;
      w_lc    <= CODE_W'(W1);
      sel     <= 1'b1;
      fa_mode <= 1'b1;
      locked  <= 1'b0;
      f1      <= '0;
      f2      <= '0;
      n_q     <= '0;
    end else begin
      unique case (state)
        S_RUN_W1:  state <= S_SET_W2;
        S_SET_W2:  begin w_lc <= CODE_W'(W2); state <= S_GET_F1; end
        S_GET_F1:  begin f1 <= f_meas; state <= S_RUN_W2; end
        S_RUN_W2:  state <= S_GET_F2;
        S_GET_F2:  begin f2 <= f_meas; state <= S_PREDICT; end
        S_PREDICT: begin w_lc <= w_pred; n_q <= n_div; state <= S_LOAD; end
        S_LOAD:    begin sel <= 1'b0; fa_mode <= 1'b0; locked <= 1'b1; state <= S_TRACK; end
        S_TRACK:
          if (n_div != n_q) begin
            w_lc    <= w_pred;
            n_q     <= n_div;
            sel     <= 1'b1;
            fa_mode <= 1'b1;
            locked  <= 1'b0;
            state   <= S_LOAD;
          end
        default:   state <= S_RUN_W1;
      endcase
    end

  // the phase loop never runs while a code is being forced into the filter,
  // and the divider is only in frequency acquisition while a code is forced
  a_modes: assert property (@(posedge ref_clk) disable iff (!rst_n)
                            !(locked && sel) && (fa_mode == sel));
endmodule
