// Behavioural model of the Scale chip's voltage-controlled oscillator.
//
// The real part is an analog, custom-designed oscillator whose frequency is
// set by the voltage on an analog input pad. This model is for simulation
// only: the control voltage arrives as a number of millivolts and the
// frequency is taken as 260 MHz at 1800 mV, scaled linearly with voltage
// (clamped to 500..3000 mV). The transfer curve is an assumption of this
// model.
module vco #(
  parameter int unsigned PERIOD_PS = 3846   // at 1800 mV
) (
  input  logic [11:0] vctrl_mv,
  output logic        clk
);
  int unsigned half_ps;

  always_comb begin
    int unsigned v;
    v = (vctrl_mv < 12'd500) ? 500 : (vctrl_mv > 12'd3000) ? 3000 : int'(vctrl_mv);
    half_ps = (PERIOD_PS * 1800 / v) / 2;
  end

  initial begin
    clk = 1'b0;
    forever #(half_ps * 1ps) clk = ~clk;
  end
endmodule
