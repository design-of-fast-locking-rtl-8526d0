// tb_lc: self-checking test of the loop control (feed-forward prediction).
//
// The counts F the divider would report are driven as random values, fresh on
// every reference cycle; the test remembers those present on the edges where
// the controller must read F1 and F2 and checks, edge by edge, the trial codes,
// sel / fa_mode / locked, Kf = floor(256 (W1-W2) / (F1-F2)) and the predicted
// code against the feed-forward formula (clamped to 0..1023, and within one
// code of the same formula in real arithmetic when in range).  Channel
// switches must re-predict from the stored F1/F2 without new measurements.
`timescale 1ns / 1fs
module tb_lc;
  localparam int W1 = 896, W2 = 128;
  logic ref_clk = 1'b0, rst_n = 1'b1;
  logic [9:0] n_div = 10'd20, f_meas = '0, w_lc;
  logic sel, fa_mode, locked;
  logic signed [31:0] kf;
  int checks = 0, failures = 0;
  int f1, f2;

  lc dut (.*);

  always #10 ref_clk = ~ref_clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic int predict(input int a, input int b, input int n, output int kfo);
    longint k, c, w;
    k = (b == a) ? 0 : ((longint'(W1 - W2) * 256) / longint'(a - b));
    kfo = int'(k);
    c = k * longint'(n - a);
    w = W1 + ((c + 128) >>> 8);
    return (w < 0) ? 0 : (w > 1023) ? 1023 : int'(w);
  endfunction

  task automatic edge_and_settle();
    @(posedge ref_clk);
    #1;
  endtask

  task automatic run_once(input int fa, input int fb, input int n);
    int wexp, kexp;
    real wr;
    rst_n = 1'b0;
    n_div = 10'(n);
    #3;
    check(w_lc == W1 && sel && fa_mode && !locked, "reset state");
    rst_n = 1'b1;
    edge_and_settle();                                // e0: W1 runs
    check(w_lc == W1 && sel, "W1 not held in cycle 1");
    f_meas = 10'($urandom_range(1023));
    edge_and_settle();                                // e1: W2
    check(w_lc == W2 && sel && fa_mode, "W2 not applied");
    f_meas = 10'(fa);
    edge_and_settle();                                // e2: F1 read
    f_meas = 10'($urandom_range(1023));
    edge_and_settle();                                // e3
    f_meas = 10'(fb);
    edge_and_settle();                                // e4: F2 read
    f_meas = 10'($urandom_range(1023));
    check(!locked && w_lc == W2, "predicted too early");
    edge_and_settle();                                // e5: prediction
    wexp = predict(fa, fb, n, kexp);
    check(w_lc == 10'(wexp), $sformatf("F1=%0d F2=%0d N=%0d: W %0d, want %0d", fa, fb, n, w_lc, wexp));
    check(kf == kexp, $sformatf("Kf %0d, want %0d", kf, kexp));
    check(sel && fa_mode && !locked, "controls during prediction");
    if (fa != fb) begin
      wr = real'(W1) + real'(W1 - W2) / real'(fa - fb) * real'(n - fa);
      if (wr > 1.0 && wr < 1022.0)
        check(real'(w_lc) > wr - 1.5 && real'(w_lc) < wr + 1.5,
              $sformatf("W %0d far from %0.2f", w_lc, wr));
    end
    edge_and_settle();                                // e6: phase loop starts
    check(!sel && !fa_mode && locked, "phase acquisition not entered");
    repeat (3) edge_and_settle();
    check(!sel && !fa_mode && locked, "did not stay locked");
    // channel switch
    @(negedge ref_clk);
    n = n + 5;
    n_div = 10'(n);
    edge_and_settle();
    wexp = predict(fa, fb, n, kexp);
    check(w_lc == 10'(wexp) && sel && fa_mode && !locked,
          $sformatf("channel switch: W %0d, want %0d", w_lc, wexp));
    edge_and_settle();
    check(!sel && !fa_mode && locked, "no return to phase acquisition after switch");
  endtask

  initial begin
    run_once(40, 6, 20);
    run_once(41, 7, 20);
    run_once(12, 12, 20);     // no frequency change: keeps W1
    run_once(40, 6, 2);       // prediction below range
    run_once(40, 6, 60);      // above range
    for (int i = 0; i < 40; i++)
      run_once($urandom_range(80, 30), $urandom_range(20, 2), $urandom_range(70, 4));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
