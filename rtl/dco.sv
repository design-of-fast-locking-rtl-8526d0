// dco: behavioural model of the five-phase ring digitally controlled oscillator.
//
// Not synthesizable: the real part is analog, a DAC that turns the control
// code into a voltage Vc and a five-stage current-starved ring whose stage delay
// Vc sets.  The model reproduces its behaviour at the pins: the output frequency
// is linear in the code,
//     f = FMIN_MHZ + code * (FMAX_MHZ - FMIN_MHZ) / (2**CODE_W - 1)
// and CLK[k] is CLK[0] delayed by k/5 of a period.  Each of the ten half-stage
// events of a period is scheduled one tenth of the period computed from the
// code at that moment, so a code change takes effect within a tenth of a cycle.
// While run is high (the loop's off state) all outputs are held low and the
// ring is stopped, which is how the delay cell saves power; the ring restarts
// with CLK[0] rising when run falls.
// Interface: code, run in; clk[4:0] out.  The 10-625 MHz range, five phases,
// the run pin and its polarity follow the described design; the linear
// code-to-frequency law and the code width are this model's assumptions.
`timescale 1ns / 1fs
module dco #(
  parameter int  CODE_W   = adpll_pkg::CODE_W,
  parameter real FMIN_MHZ = 10.0,
  parameter real FMAX_MHZ = 625.0
) (
  input  logic [CODE_W-1:0] code,
  input  logic              run,
  output logic [4:0]        clk
);
  logic [3:0] ph;   // ring position: ten half-stage events per period

  function automatic real period_ns(input logic [CODE_W-1:0] c);
    real f;
    f = FMIN_MHZ + real'(c) * (FMAX_MHZ - FMIN_MHZ) / real'((1 << CODE_W) - 1);
    return 1000.0 / f;
  endfunction

  function automatic logic [4:0] phases(input logic [3:0] p);
    logic [4:0] v;
    for (int k = 0; k < 5; k++) v[k] = ((int'(p) - 2 * k + 10) % 10) < 5;
    return v;
  endfunction

  initial ph = 4'd0;

  // one ring event every tenth of the current period; held at 0 while off
  always begin : ring
    if (run) begin
      ph = 4'd0;
      @(negedge run);
    end else begin
      #(period_ns(code) / 10.0);
      if (!run) ph = (ph == 4'd9) ? 4'd0 : ph + 4'd1;
    end
  end

  assign clk = run ? 5'b0 : phases(ph);
endmodule
