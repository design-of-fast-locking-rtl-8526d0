// tb_adpll_range: the ADPLL across its 10-625 MHz output range.
//
// Two loops run side by side.  Loop A uses the default parameters with a
// 13.55 MHz reference and steps through divider ratios 8, 12, 30 and 46
// (108 to 623 MHz) by channel switches.  Loop B uses a 1.5 MHz reference for
// the low end (N = 8 and 12: 12 and 18 MHz); its filter gains are scaled down
// by the reference-period ratio (KP = 0.33, KI = 0.055 codes per T_DCO/5, eight
// fraction bits), because one code of frequency error moves the phase nine
// times further per reference cycle.  For every channel the test checks that
// the phase error settles within 2/5 of a DCO period within 24 reference cycles
// of the prediction and that the DCO, averaged over 16 reference cycles after
// a further 16, runs at N * f_ref within 1 %.
`timescale 1ns / 1fs
module tb_adpll_range;
  int checks = 0, failures = 0;
  int done_cnt = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  for (genvar L = 0; L < 2; L++) begin : g_loop
    localparam real FREF = (L == 0) ? 13.55 : 1.5;
    localparam real TREF = 1000.0 / FREF;
    localparam int  NCH  = (L == 0) ? 4 : 2;
    localparam int  NLIST [4] = (L == 0) ? '{8, 12, 30, 46} : '{8, 12, 0, 0};

    logic        ref_clk = 1'b0, rst_n = 1'b1, run = 1'b1;
    logic [9:0]  n_div = 10'(NLIST[0]);
    logic [4:0]  clk_out;
    logic        div_clk, p_error, up, dn, reset_div, lead, fa_mode, locked;
    logic [9:0]  code, f_meas;
    logic [5:0]  p1;
    logic signed [31:0] kf;
    int          edges0 = 0;

    if (L == 0) begin : g_a
      adpll_top dut (.*);
    end else begin : g_b
      adpll_top #(.FRAC(8), .KP(85), .KI(14)) dut (.*);
    end

    always #(TREF / 2.0) ref_clk = ~ref_clk;
    always @(posedge clk_out[0]) edges0++;

    initial begin
      int good, cyc, e0;
      real fest, fwant;
      #1 rst_n = 1'b0;
      #(2 * TREF);
      run = 1'b0;
      #5 rst_n = 1'b1;
      for (int c = 0; c < NCH; c++) begin
        if (c > 0) begin
          @(negedge ref_clk);
          n_div = 10'(NLIST[c]);
          @(posedge ref_clk);
        end
        @(posedge locked);
        good = 0;
        cyc  = 0;
        while (good < 8 && cyc < 32) begin
          @(posedge ref_clk);
          cyc++;
          if (p1 <= 2) good++; else good = 0;
        end
        check(good == 8, $sformatf("loop %0d N=%0d: no phase lock (p1=%0d)", L, NLIST[c], p1));
        repeat (16) @(posedge ref_clk);
        e0 = edges0;
        repeat (16) @(posedge ref_clk);
        fwant = FREF * NLIST[c];
        fest  = real'(edges0 - e0) / (16.0 * TREF) * 1000.0;
        check(fest > 0.99 * fwant && fest < 1.01 * fwant,
              $sformatf("loop %0d N=%0d: DCO %0.2f MHz, want %0.2f", L, NLIST[c], fest, fwant));
        $display("loop %0d: N=%0d locked %0d cycles after prediction, DCO %0.2f MHz (want %0.2f), code %0d",
                 L, NLIST[c], cyc - 8, fest, fwant, code);
      end
      done_cnt++;
    end
  end

  initial begin
    wait (done_cnt == 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #(1000.0 / 1.5 * 300);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
