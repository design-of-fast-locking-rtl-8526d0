// md: modified divider (MD) with the PFD inside.
//
// One counter, clocked by DCO phase CLK[0], serves two purposes selected by an
// input multiplexer on its next-count logic:
//   frequency acquisition (fa_mode = 1): the counter is restarted on every
//     synchronised reference edge, after saveF has stored the count of the
//     period that ended (f_meas = DCO cycles per reference cycle, the F of the
//     feed-forward algorithm); the PFD is held in reset.
//   phase acquisition (fa_mode = 0): the counter is preset once (Reset_syn) so
//     that the divided clock starts in phase with the reference, then divides
//     CLK[0] by n_div; div_clk is high for counts 0 .. n_div/2-1.  The PFD
//     compares the falling edges of ref_clk and div_clk, and T2D counts CLK[0]
//     edges inside the error pulse.
// Interface: ref_clk, clk0, rst_n (async, active low), n_div, fa_mode in;
// div_clk, f_meas, up/dn/p_error (PFD), p_cnt and lead (T2D), zero (counter
// clear for the P2D) and reset_div out.
// Timing: f_meas and the divider are registered on CLK[0]; the counter is
// restarted three CLK[0] cycles after the reference edge.  The sub-blocks
// (divider, saveF, Reset_syn, T2D, PFD, input multiplexer) follow the described
// design; the way they share one counter is this design's own.
`timescale 1ns / 1fs
module md #(
  parameter int CNT_W = adpll_pkg::CNT_W,
  parameter int N_W   = adpll_pkg::N_W,
  parameter int PC_W  = adpll_pkg::PC_W,
  parameter int ALIGN = 2
) (
  input  logic             clk0,
  input  logic             rst_n,
  input  logic             ref_clk,
  input  logic [N_W-1:0]   n_div,
  input  logic             fa_mode,
  output logic             div_clk,
  output logic [CNT_W-1:0] f_meas,
  output logic             up,
  output logic             dn,
  output logic             p_error,
  output logic [PC_W-1:0]  p_cnt,
  output logic             lead,
  output logic             zero,
  output logic             reset_div
);
  logic             ref_rise, cnt_clear, cnt_align;
  logic [CNT_W-1:0] cnt, cnt_next;

  reset_syn u_rsyn (
    .clk0, .rst_n, .ref_clk, .fa_mode,
    .ref_rise, .cnt_clear, .cnt_align, .reset_div, .zero
  );

  savef #(.CNT_W(CNT_W)) u_savef (
    .clk0, .rst_n, .capture(cnt_clear), .count(cnt), .f_meas
  );

  // input multiplexer of the divider: restart, align preset, wrap or count
  always_comb begin
    if (cnt_clear)                                   cnt_next = '0;
    else if (cnt_align)                              cnt_next = CNT_W'(ALIGN);
    else if (!fa_mode && cnt >= CNT_W'(n_div - N_W'(1))) cnt_next = '0;
    else                                             cnt_next = cnt + CNT_W'(1);
  end

  always_ff @(posedge clk0 or negedge rst_n)
    if (!rst_n) begin
      cnt     <= '0;
      div_clk <= 1'b0;
    end else begin
      cnt     <= cnt_next;
      div_clk <= (cnt_next < CNT_W'(n_div >> 1));
    end

  pfd u_pfd (.ref_clk, .div_clk, .reset_div, .up, .dn, .p_error);

  t2d #(.PC_W(PC_W)) u_t2d (
    .clk0, .rst_n, .zero, .p_error, .up, .p_cnt, .lead
  );
endmodule
