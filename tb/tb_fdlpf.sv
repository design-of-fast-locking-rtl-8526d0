// tb_fdlpf: self-checking test of the loop filter.
//
// Applies random phase errors of both signs, loads of the predicted code
// (sel) and saturating runs, and compares code after every reference edge with
// an integer reference model of  I += KI*e;  code = clamp(I + KP*e) >> FRAC.
`timescale 1ns / 1fs
module tb_fdlpf;
  localparam int FRAC = 4, KP = 48, KI = 8, INIT = 512;
  logic ref_clk = 1'b0, rst_n = 1'b1, lead = 1'b0, sel = 1'b0;
  logic [5:0] p1 = '0;
  logic [9:0] w_lc = '0, code;
  int checks = 0, failures = 0;
  longint integ_m, e, o;
  int code_m;

  fdlpf dut (.*);

  always #5 ref_clk = ~ref_clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    integ_m = INIT << FRAC;
    code_m  = INIT;
    #1 rst_n = 1'b0;
    #11 rst_n = 1'b1;
    check(code == INIT, "reset code");
    for (int i = 0; i < 400; i++) begin
      @(negedge ref_clk);
      sel  = ($urandom_range(15) == 0);
      w_lc = 10'($urandom);
      p1   = (i > 200 && i < 260) ? 6'd19 : 6'($urandom_range(19));
      lead = (i > 200 && i < 260) ? 1'b1 : 1'($urandom);
      @(posedge ref_clk);
      e = lead ? longint'(p1) : -longint'(p1);
      if (sel) begin
        integ_m = longint'(w_lc) << FRAC;
        code_m  = w_lc;
      end else begin
        integ_m = integ_m + KI * e;
        if (integ_m < 0) integ_m = 0;
        if (integ_m > (1023 << FRAC)) integ_m = 1023 << FRAC;
        o = integ_m + KP * e;
        code_m = (o < 0) ? 0 : (o > (1023 << FRAC)) ? 1023 : int'(o >>> FRAC);
      end
      #1 check(code == 10'(code_m), $sformatf("step %0d: code %0d, model %0d", i, code, code_m));
    end
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
