// rc_osc: behavioural model of the ultra-low-power configurable RC oscillator
// that clocks the IDC. This is not synthesizable logic: the real part is an
// analog sub-threshold circuit (constant-gm current reference, start-up, a
// capacitor charged by a constant current and a threshold transistor that
// resets it, and an inverter output stage).
//
// The capacitor is an 8-bit binary weighted bank set by OSC_CTRL. The model
// takes the frequency as inversely proportional to the total capacitance,
//   f(code) = F_MAX_HZ / (1 + code * (F_MAX_HZ/F_MIN_HZ - 1) / 255),
// so code 0 gives F_MAX_HZ (362.37 kHz) and code 255 gives F_MIN_HZ
// (12.16 kHz), the two measured end points. The 1/C law in between is this
// model's assumption. A new code takes effect at the next half period.
// ENB (active low) enables the oscillator; when it is high CLK stays low
// (the model keeps timing half periods but holds the output low).
// The second enable of the schematic (ENT) is not modelled.
// A synthesis tool that ignores the delays sees the free-running always block
// as an inverter feeding itself; that loop is the oscillator and stands.
module rc_osc #(
  parameter real F_MAX_HZ = 362370.0,
  parameter real F_MIN_HZ = 12160.0
) (
  input  logic       enb,
  input  logic [7:0] osc_ctrl,
  output logic       clk
);
  timeunit 1ns;
  timeprecision 1ps;

  function automatic real half_period_ns(input logic [7:0] code);
    real f;
    f = F_MAX_HZ / (1.0 + real'(code) * (F_MAX_HZ / F_MIN_HZ - 1.0) / 255.0);
    return 0.5e9 / f;
  endfunction

  initial clk = 1'b0;

  always begin
    #(half_period_ns(osc_ctrl));
    clk = enb ? 1'b0 : ~clk;
  end
endmodule
