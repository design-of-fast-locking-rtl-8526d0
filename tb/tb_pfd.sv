// tb_pfd: self-checking test of the phase/frequency detector.
//
// Drives falling edges of ref_clk and div_clk with random offsets of either
// sign and checks that the flag of the earlier input rises, that p_error is
// high for exactly the offset, that both flags are cleared when the later edge
// arrives, and that reset_div holds the detector cleared.
`timescale 1ns / 1fs
module tb_pfd;
  logic ref_clk = 1'b1, div_clk = 1'b1, reset_div = 1'b1;
  logic up, dn, p_error;
  int   checks = 0, failures = 0;
  real  t_rise, width;

  pfd dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(posedge p_error) t_rise = $realtime;
  always @(negedge p_error) width = $realtime - t_rise;

  task automatic trial(input real off);   // off > 0: reference falls first
    width = -1.0;
    #10;
    if (off >= 0.0) begin
      ref_clk = 1'b0;
      #0.001;
      check(up && !dn && p_error, "up not set by reference edge");
      #(off - 0.001);
      div_clk = 1'b0;
    end else begin
      div_clk = 1'b0;
      #0.001;
      check(dn && !up && p_error, "dn not set by divided-clock edge");
      #(-off - 0.001);
      ref_clk = 1'b0;
    end
    #0.001;
    check(!up && !dn && !p_error, "flags not cleared after both edges");
    check(width > (off < 0 ? -off : off) - 0.0001 && width < (off < 0 ? -off : off) + 0.0001,
          $sformatf("pulse width %0.4f, want %0.4f", width, off));
    #10;
    ref_clk = 1'b1;
    div_clk = 1'b1;
  endtask

  initial begin
    #5;
    ref_clk = 1'b0;
    #1;
    check(!up && !dn && !p_error, "reset_div does not hold the detector");
    ref_clk = 1'b1;
    #5 reset_div = 1'b0;
    for (int i = 0; i < 40; i++)
      trial((real'($urandom_range(2000, 1)) / 100.0) * ((i % 2) ? -1.0 : 1.0));
    // reset_div clears a pending flag
    #10 ref_clk = 1'b0;
    #1 check(up, "up not set");
    reset_div = 1'b1;
    #0.001 check(!up && !p_error, "reset_div does not clear up");
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
