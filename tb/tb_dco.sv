// tb_dco: self-checking test of the DCO model.
//
// For a set of codes, measures the CLK[0] period over 50 cycles and compares it
// with 1000 / (10 + code * 615 / 1023) ns; checks that CLK[k] rises k/5 of a
// period after CLK[0]; checks that run high stops all phases.
`timescale 1ns / 1fs
module tb_dco;
  logic [9:0] code = 10'd0;
  logic       run  = 1'b1;
  logic [4:0] clk;
  int checks = 0, failures = 0;
  real t0, t1, tk, per, want;

  dco dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #100;
    check(clk == '0, "outputs not low while run is high");
    run = 1'b0;
    for (int i = 0; i < 6; i++) begin
      code = 10'(i * 200 + 23);
      want = 1000.0 / (10.0 + real'(code) * 615.0 / 1023.0);
      repeat (3) @(posedge clk[0]);
      t0 = $realtime;
      repeat (50) @(posedge clk[0]);
      t1  = $realtime;
      per = (t1 - t0) / 50.0;
      check(per > want * 0.999 && per < want * 1.001,
            $sformatf("code %0d: period %0.4f ns, want %0.4f", code, per, want));
      for (int k = 1; k < 5; k++) begin
        @(posedge clk[0]);
        t0 = $realtime;
        @(posedge clk[k]);
        tk = $realtime - t0;
        check(tk > want * k / 5.0 - 0.01 && tk < want * k / 5.0 + 0.01,
              $sformatf("code %0d: CLK[%0d] delay %0.4f, want %0.4f", code, k, tk, want * k / 5.0));
      end
    end
    run = 1'b1;
    #1;
    check(clk == '0, "outputs not cleared by run");
    t0 = $realtime;
    #500;
    check(clk == '0, "oscillator did not stop");
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
