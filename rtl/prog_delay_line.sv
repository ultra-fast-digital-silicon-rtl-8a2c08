`timescale 1ps / 1ps
// prog_delay_line: behavioural model of the programmable delay line of the
// time-over-threshold trigger (the delay elements are analog).
//
// Eight delay elements X1..X8 each carry a copy of the input; element k
// (k = 1..8) delays it by BASE_PS - STEP_PS + k*STEP_PS, i.e. 600 ps to 1300 ps
// with the defaults. A one-hot select closes exactly one switch onto the output.
// The 100 ps step and the 600 ps minimum are the design's; how the remaining
// 100 ps of the stated 1.4 ns maximum arise is not given, so the taps stop at
// 1.3 ns. Delays are transport delays, so a pulse shorter than the delay passes
// through intact.
//
// Interface: in, sel[7:0] (one-hot) -> out.
module prog_delay_line #(
  parameter int unsigned BASE_PS = 600,
  parameter int unsigned STEP_PS = 100
) (
  input  logic       in,
  input  logic [7:0] sel,
  output logic       out
);
  logic [7:0] tap;

  initial tap = '0;

  for (genvar k = 0; k < 8; k++) begin : g_tap
    always @(in) tap[k] <= #(BASE_PS + k * STEP_PS) in;
  end

  assign out = |(tap & sel);
endmodule
