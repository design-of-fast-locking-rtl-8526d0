// tb_p2d: self-checking test of the phase-to-digital converter.
//
// Generates five clock phases (CLK[k] = CLK[0] delayed by k/5 of a period),
// counts CLK[0] edges inside each error pulse as the divider's T2D does, and
// opens pulses of random start and width up to 2.9 periods (at most three CLK[0] edges, the
// range of the 2-bit coarse count).  The expected P1 is
// the number of rising edges of all five phases inside the pulse, counted here
// independently; it must match after every pulse, and zero must clear it.
`timescale 1ns / 1fs
module tb_p2d;
  localparam real T = 3.69;
  logic [4:0] ph = '0;
  logic [1:0] p = '0;
  logic       p_error = 1'b0, zero = 1'b0;
  logic [5:0] p1;
  int checks = 0, failures = 0;
  int total;

  p2d dut (.p, .clk1(ph[1]), .clk2(ph[2]), .clk3(ph[3]), .clk4(ph[4]),
           .five(4'd5), .p_error, .zero, .p1);

  for (genvar k = 0; k < 5; k++) begin : g_clk
    initial begin
      #(T * k / 5.0 + 0.3);
      forever begin
        ph[k] = 1'b1;
        #(T / 2.0);
        ph[k] = 1'b0;
        #(T / 2.0);
      end
    end
    always @(posedge ph[k]) if (p_error) total++;
  end

  // coarse count of CLK[0], as the T2D would deliver it
  always @(posedge ph[0])
    if (zero)         p <= '0;
    else if (p_error) p <= p + 2'd1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #1;
    for (int i = 0; i < 300; i++) begin
      @(posedge ph[0]);
      zero = 1'b1;
      @(posedge ph[0]);
      #0.05 zero = 1'b0;
      check(p1 == 0, "zero does not clear P1");
      total = 0;
      #(real'($urandom_range(1000)) / 1000.0 * T + 0.05);
      p_error = 1'b1;
      #(real'($urandom_range(2900)) / 1000.0 * T + 0.011);
      p_error = 1'b0;
      #0.01;
      check(p1 == 6'(total), $sformatf("pulse %0d: P1 %0d, edges %0d", i, p1, total));
    end
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
