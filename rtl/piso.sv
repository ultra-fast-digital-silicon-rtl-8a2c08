`timescale 1ps / 1ps
// piso: parallel-in serial-out readout register, the single data output of the
// device.
//
// At the end of an acquisition, load copies the frame (photon count, the two TDC
// results and the event count) into the register on a rising edge of clk; on every
// following edge it shifts out one bit, MSB first, on sdo, with zeros entering at
// the bottom. A frame of W bits takes W clock cycles: the MSB is on sdo right
// after the load edge, bit W-1-i after i more edges. Field order and MSB-first
// order are this implementation's choice.
module piso #(
  parameter int unsigned W = 45
) (
  input  logic         clk,
  input  logic         load,
  input  logic [W-1:0] din,
  output logic         sdo
);
  logic [W-1:0] sr;

  always_ff @(posedge clk) begin
    if (load) sr <= din;
    else      sr <= {sr[W-2:0], 1'b0};
  end

  assign sdo = sr[W-1];
endmodule
