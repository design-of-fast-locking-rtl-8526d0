// tb_md: self-checking test of the modified divider (with its PFD, saveF,
// Reset_syn and T2D).
//
// CLK[0] has a fixed period T; the reference period is varied.
//   frequency acquisition: f_meas must equal TREF/T rounded up or down, the PFD
//     must stay cleared;
//   switch to phase acquisition: reset_div must fall once, the first falling
//     edge of div_clk must lie within one T after the reference's, and div_clk
//     must then have period N*T with N/2 cycles high;
//   phase error: with the reference slightly slow or fast, every error pulse is
//     checked against the CLK[0] edges counted here (T2D count, saturating at
//     3) and against which input fell first (lead).
`timescale 1ns / 1fs
module tb_md;
  localparam real T = 3.69;
  localparam int  N = 20;
  real        tref = 73.8;
  logic       clk0 = 1'b0, ref_clk = 1'b0, rst_n = 1'b1, fa_mode = 1'b1;
  logic [9:0] n_div = 10'(N);
  logic       div_clk, up, dn, p_error, lead, zero, reset_div;
  logic [9:0] f_meas;
  logic [1:0] p_cnt;
  int checks = 0, failures = 0;
  int edges, n_win = 0, n_lead = 0, n_lag = 0;
  bit ref_first;
  real t_rf, t_df, t_dr0, t_dr1, t_al;

  md dut (.*);

  always #(T / 2.0) clk0 = ~clk0;
  initial forever begin #(tref / 2.0) ref_clk = ~ref_clk; end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // independent T2D model: CLK[0] edges inside the error pulse
  always @(posedge clk0) if (p_error && edges < 3) edges++;
  bit win_ok;
  always @(posedge p_error) begin
    win_ok    = rst_n && $realtime > 20.0;
    edges     = 0;
    ref_first = (t_rf >= t_df);
  end
  always @(negedge ref_clk) t_rf = $realtime;
  always @(negedge div_clk) t_df = $realtime;
  always @(negedge p_error) if (win_ok) begin
    #0.01;
    n_win++;
    if (ref_first) n_lead++; else n_lag++;
    check(p_cnt == 2'(edges), $sformatf("T2D count %0d, edges %0d", p_cnt, edges));
    check(lead == ref_first, "lead does not show which edge came first");
  end

  task automatic freq_phase(input real period);
    tref = period;
    repeat (4) @(posedge ref_clk);
    #(tref / 2.0);
    check(f_meas == 10'($floor(tref / T)) || f_meas == 10'($ceil(tref / T)),
          $sformatf("f_meas %0d for ratio %0.3f", f_meas, tref / T));
    check(reset_div && !up && !dn, "PFD not held in frequency acquisition");
  endtask

  task automatic lock_phase(input real drift);
    @(posedge ref_clk);
    fa_mode = 1'b0;
    @(negedge reset_div);
    @(negedge ref_clk) t_al = $realtime;
    @(negedge div_clk) t_al = $realtime - t_al;
    check(t_al > -0.01 && t_al < T + 0.01,
          $sformatf("divider not aligned: div falls %0.3f ns after ref", t_al));
    @(posedge div_clk) t_dr0 = $realtime;
    @(negedge div_clk) t_al = $realtime;
    @(posedge div_clk) t_dr1 = $realtime;
    check(t_dr1 - t_dr0 > N * T - 0.01 && t_dr1 - t_dr0 < N * T + 0.01,
          $sformatf("div period %0.3f, want %0.3f", t_dr1 - t_dr0, N * T));
    check(t_al - t_dr0 > N / 2 * T - 0.01 && t_al - t_dr0 < N / 2 * T + 0.01, "div duty");
    tref = N * T + drift;
    repeat (24) @(posedge ref_clk);
    fa_mode = 1'b1;
  endtask

  initial begin
    #1 rst_n = 1'b0;
    #9 rst_n = 1'b1;
    freq_phase(73.8);
    freq_phase(61.1);
    freq_phase(90.3);
    freq_phase(73.8);
    lock_phase(0.45);   // reference slow: divided clock falls first
    freq_phase(73.8);
    lock_phase(-0.45);  // reference fast: reference falls first
    check(n_lead > 5 && n_lag > 5, $sformatf("windows: lead %0d lag %0d", n_lead, n_lag));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
