`timescale 1ps / 1ps
// tot_filter: time-over-threshold trigger for the first-photon TDC.
//
// The global timing signal is delayed by a programmable amount and ANDed with its
// undelayed self, so the trigger rises only if the signal has stayed high longer
// than the delay. An isolated photon gives one 400 ps pulse, shorter than the
// smallest threshold (600 ps), and never triggers; several photons whose pulses
// overlap stretch the signal past the threshold and do. The 3-bit threshold code
// is turned into a one-hot tap select by an encoder, as in the design; the delay
// is 600 ps + 100 ps * code.
//
// Because the filter compares the signal with a delayed copy of itself, two short
// pulses whose start times differ by about the threshold also overlap at the AND
// gate and trigger; only pulses spaced further apart are rejected.
//
// Interface: tree_out, code[2:0] -> trig. trig rises one threshold after
// tree_out rises (if tree_out is still high) and falls with tree_out.
module tot_filter #(
  parameter int unsigned BASE_PS = 600,
  parameter int unsigned STEP_PS = 100
) (
  input  logic       tree_out,
  input  logic [2:0] code,
  output logic       trig
);
  logic [7:0] onehot;
  logic       delayed;

  // binary-to-one-hot encoder
  always_comb begin
    onehot = '0;
    onehot[code] = 1'b1;
  end

  prog_delay_line #(.BASE_PS(BASE_PS), .STEP_PS(STEP_PS)) u_dly (
    .in(tree_out), .sel(onehot), .out(delayed)
  );

  assign trig = tree_out & delayed;
endmodule
