// tb_adpll_top: end-to-end test of the ADPLL at its default parameters.
//
// Reference 13.55 MHz, divider ratio 20 (271 MHz), then a channel switch to 25
// (338.75 MHz) and back down to 16 (216.8 MHz).  The test holds the DCO in its
// off state first, then releases reset and checks, against values computed
// here from the DCO law and the reference period:
//   - no DCO edges while run is high;
//   - the trial codes W1/W2 and the counts F1/F2 read in reference cycles 1, 3;
//   - the predicted code against the feed-forward formula in real arithmetic;
//   - that within LOCK_CYC reference cycles of each prediction the DCO runs at
//     N * f_ref (edge count over 8 reference cycles, within 1 %) and the phase
//     error stays within 2/5 of a DCO period for 8 reference cycles.
// It counts how often each mechanism occurred (power-down, frequency
// measurement, prediction, divider alignment, lead and lag errors, loop-filter
// corrections, channel switches) and fails any that never did.
`timescale 1ns / 1fs
module tb_adpll_top;
  import adpll_pkg::*;

  localparam real FREF_MHZ = 13.55;
  localparam real TREF     = 1000.0 / FREF_MHZ;
  localparam int  W1 = 896, W2 = 128;
  localparam int  LOCK_CYC = 16;

  logic                ref_clk = 1'b0, rst_n = 1'b1, run = 1'b1;
  logic [N_W-1:0]      n_div = 20;
  logic [NPH-1:0]      clk_out;
  logic                div_clk, p_error, up, dn, reset_div, lead, fa_mode, locked;
  logic [CODE_W-1:0]   code;
  logic [CNT_W-1:0]    f_meas;
  logic [P1_W-1:0]     p1;
  logic signed [31:0]  kf;

  int checks = 0, failures = 0;
  int m_pd = 0, m_fmeas = 0, m_pred = 0, m_align = 0, m_lead = 0, m_lag = 0,
      m_corr = 0, m_switch = 0;
  int refcnt = 0, edges0 = 0;

  adpll_top dut (.*);

  always #(TREF / 2.0) ref_clk = ~ref_clk;
  always @(posedge clk_out[0]) edges0++;

  function automatic real f_of(input int c);
    return 10.0 + real'(c) * 615.0 / 1023.0;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // mechanism counters, sampled at every reference edge
  logic [CODE_W-1:0] code_q;
  always @(posedge ref_clk) begin
    refcnt++;
    if (!fa_mode && locked && p1 != 0 &&  lead) m_lead++;
    if (!fa_mode && locked && p1 != 0 && !lead) m_lag++;
    if (locked && code != code_q) m_corr++;
    code_q = code;
  end
  always @(negedge reset_div) m_align++;

  task automatic wait_ref(input int n);
    repeat (n) @(posedge ref_clk);
  endtask

  // predict, lock and verify one channel; returns the cycles to lock
  task automatic lock_check(input int n, input real f1, input real f2, input string tag);
    real   fwant, fest, w_exp;
    int    e0, good, cyc;
    fwant = real'(n) * FREF_MHZ;
    w_exp = real'(W1) + real'(W1 - W2) / (f1 - f2) * (real'(n) - f1);
    // the predicted code is loaded two edges after fa_mode rises (or after F2)
    @(posedge locked);
    m_pred++;
    #1;
    check(code >= CODE_W'(int'(w_exp) - 2) && code <= CODE_W'(int'(w_exp) + 2),
          $sformatf("%s predicted code %0d, formula %0.1f", tag, code, w_exp));
    good = 0;
    cyc  = 0;
    while (good < 8 && cyc < LOCK_CYC + 8) begin
      @(posedge ref_clk);
      cyc++;
      if (p1 <= 2) good++; else good = 0;
    end
    check(good == 8, $sformatf("%s phase lock not reached (p1=%0d)", tag, p1));
    $display("%s: phase error within 2/5 T_DCO from cycle %0d after prediction", tag, cyc - 8);
    @(posedge ref_clk);
    e0 = edges0;
    wait_ref(8);
    fest = real'(edges0 - e0) / (8.0 * TREF) * 1000.0;
    check(fest > 0.99 * fwant && fest < 1.01 * fwant,
          $sformatf("%s DCO %0.2f MHz, want %0.2f", tag, fest, fwant));
    $display("%s: N=%0d DCO %0.2f MHz (want %0.2f), code %0d", tag, n, fest, fwant, code);
  endtask

  real f1r, f2r;
  int  e_off;

  initial begin
    // off state: DCO stopped
    #1 rst_n = 1'b0;
    e_off = edges0;
    #(3 * TREF);
    check(edges0 == e_off && clk_out == '0, "DCO ran while run was high");
    m_pd++;
    @(negedge ref_clk);
    run   = 1'b0;
    #5 rst_n = 1'b1;
    // reference cycle 1 runs at W1, cycle 3 at W2
    @(posedge ref_clk); #1;
    check(dut.u_lc.w_lc == W1 && fa_mode, "trial code W1 not applied");
    wait_ref(1); #1;
    check(code == W1, $sformatf("DCO code %0d during cycle 1, want W1", code));
    wait_ref(1); #1;
    check(code == W2 || dut.u_lc.w_lc == W2, "trial code W2 not applied");
    f1r = real'(f_meas);
    check(f1r >= $floor(f_of(W1) / FREF_MHZ) - 1.0 && f1r <= $ceil(f_of(W1) / FREF_MHZ) + 1.0,
          $sformatf("F1 = %0d, DCO/ref ratio %0.2f", f_meas, f_of(W1) / FREF_MHZ));
    m_fmeas++;
    wait_ref(2); #1;
    f2r = real'(f_meas);
    check(f2r >= $floor(f_of(W2) / FREF_MHZ) - 1.0 && f2r <= $ceil(f_of(W2) / FREF_MHZ) + 1.0,
          $sformatf("F2 = %0d, DCO/ref ratio %0.2f", f_meas, f_of(W2) / FREF_MHZ));
    m_fmeas++;
    lock_check(20, f1r, f2r, "ch20");
    // locking time as the described design states it: prediction within 2 codes
    // is checked above; channel switches re-use Kf
    @(negedge ref_clk); n_div = 25; m_switch++;
    lock_check(25, f1r, f2r, "ch25");
    @(negedge ref_clk); n_div = 16; m_switch++;
    lock_check(16, f1r, f2r, "ch16");
    check(m_pd > 0,     "power-down never exercised");
    check(m_fmeas == 2, "frequency measurements missing");
    check(m_pred == 3,  "predictions missing");
    check(m_align == 3, $sformatf("divider alignments %0d, want 3", m_align));
    check(m_lead > 0,   "no lead error seen");
    check(m_lag > 0,    "no lag error seen");
    check(m_corr > 0,   "loop filter never corrected the code");
    check(m_switch == 2, "channel switches missing");
    $display("mechanisms: power_down=%0d freq_meas=%0d predict=%0d align=%0d lead=%0d lag=%0d corrections=%0d switches=%0d",
             m_pd, m_fmeas, m_pred, m_align, m_lead, m_lag, m_corr, m_switch);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #(400 * TREF);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
