`timescale 1ps / 1ps
// monostable: behavioural model of the in-pixel 400 ps monostable (an analog
// timing element, not synthesizable logic).
//
// A falling edge on trig_n (the pixel's detection signal) starts a negative pulse
// of T_MONO_PS on pulse_n, which goes to the timing tree. The pulse width is the
// design's 400 ps. Whether the real circuit retriggers during its pulse is not
// stated; the model ignores edges while the pulse is active, which cannot matter
// in use because the SPAD dead time (several ns) is far longer.
module monostable #(
  parameter int unsigned T_MONO_PS = 400
) (
  input  logic trig_n,
  output logic pulse_n
);
  initial pulse_n = 1'b1;

  always begin
    @(negedge trig_n);
    pulse_n = 1'b0;
    #(T_MONO_PS);
    pulse_n = 1'b1;
  end
endmodule
