`timescale 1ps / 1ps
// trigger_select: chooses what starts the first-photon TDC.
//
// Three modes, as in the design: DIRECT passes the global timing signal, so the
// TDC starts at the first photon; TOT uses the time-over-threshold filter; COINC
// uses the spatial coincidence of adjacent double rows (two or three). The mode,
// threshold code and coincidence size come from the control register (ctrl_t);
// their encoding is this implementation's, and mode value 3 acts as DIRECT.
//
// Interface: tree_out, local_n[N_DR-1:0] (active low), ctrl -> trig.
module trigger_select
  import dsipm_pkg::*;
#(
  parameter int unsigned N_DR = 16
) (
  input  logic               tree_out,
  input  logic [N_DR-1:0] local_n,
  input  ctrl_t              ctrl,
  output logic               trig
);
  logic trig_tot, trig_coinc;

  tot_filter u_tot (
    .tree_out(tree_out), .code(ctrl.tot_code), .trig(trig_tot)
  );

  coincidence_detector #(.N_DROWS(N_DR)) u_coinc (
    .row_act(~local_n), .three(ctrl.coinc3), .trig(trig_coinc)
  );

  always_comb begin
    unique case (ctrl.mode)
      TRIG_TOT:   trig = trig_tot;
      TRIG_COINC: trig = trig_coinc;
      default:    trig = tree_out;
    endcase
  end
endmodule
