`timescale 1ps / 1ps
// spad_quench: behavioural model of a SPAD with its passive cascode quenching
// network (M1-M4) and the test injection transistor M5. The circuit is analog
// and high-voltage; this model only reproduces what the pixel logic sees.
//
// A rising edge on photon, while the pixel is enabled, starts an avalanche: the
// node after the voltage-clamping transistor goes high and stays high for the
// dead time, during which further photons are lost. The dead time is set in the
// real circuit by the recharge bias (about 4 ns to 16 ns); DEAD_TIME_PS picks one
// value. A disabled pixel never avalanches. test_n low pulls the node high, as
// M5 does, to emulate a photon. Interface: photon, en, test_n -> node.
module spad_quench #(
  parameter int unsigned DEAD_TIME_PS = 8000
) (
  input  logic photon,
  input  logic en,
  input  logic test_n,
  output logic node
);
  logic aval;

  initial aval = 1'b0;

  always begin
    @(posedge photon);
    if (en) begin
      aval = 1'b1;
      #(DEAD_TIME_PS);
      aval = 1'b0;
    end
  end

  assign node = aval | ~test_n;
endmodule
