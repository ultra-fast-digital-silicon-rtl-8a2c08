`timescale 1ps / 1ps
// coincidence_detector: spatial-coincidence trigger for the first-photon TDC.
//
// row_act[i] is high while double row i has a monostable pulse (the inverted
// local tree output). Two-input AND gates detect activity in two neighbouring
// double rows, three-input ANDs in three neighbours, and an OR tree merges each
// set into a trigger; three selects which of the two triggers is used. As the
// pulses last 400 ps, a coincidence means hits in neighbouring double rows within
// that window. The two circuits are the design's; neighbours do not wrap from the
// last double row to the first (not specified).
//
// Interface: row_act[N_DROWS-1:0], three -> trig. Combinational.
module coincidence_detector #(
  parameter int unsigned N_DROWS = 16
) (
  input  logic [N_DROWS-1:0] row_act,
  input  logic               three,
  output logic               trig
);
  logic [N_DROWS-2:0] pair;
  logic [N_DROWS-3:0] triple;

  for (genvar i = 0; i < N_DROWS - 1; i++) begin : g_pair
    assign pair[i] = row_act[i] & row_act[i+1];
  end
  for (genvar i = 0; i < N_DROWS - 2; i++) begin : g_triple
    assign triple[i] = row_act[i] & row_act[i+1] & row_act[i+2];
  end

  assign trig = three ? |triple : |pair;
endmodule
