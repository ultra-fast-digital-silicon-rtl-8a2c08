`timescale 1ps / 1ps
// pixel_frontend: digital part of one microcell.
//
// A three-input gate combines the avalanche node with the pixel enable EN and the
// global GATE window: det_n falls while an enabled pixel sees an avalanche inside
// the window. det_n is the set input (active low) of an SR latch whose output hit
// tells the double row's parallel counter that the pixel fired; RESET (rst_n,
// active low) clears it before each acquisition. det_n also triggers the pixel's
// monostable for the timing tree. EN comes from a one-bit in-pixel memory written
// with the column register bit while the pixel's word line wr is high.
//
// All of this follows the design's pixel schematic, except that the word line is
// the row register bit gated with a global write strobe (a choice of this
// implementation) and that RESET wins when both latch inputs are active.
//
// The SR latch and the enable memory are level-sensitive storage cells and are
// written as latches on purpose. The enable bit is undefined until written.
module pixel_frontend (
  input  logic node,
  input  logic gate,
  input  logic rst_n,
  input  logic wr,
  input  logic wdata,
  output logic en,
  output logic det_n,
  output logic hit
);
  // in-pixel enable memory
  always_latch begin
    if (wr) en = wdata;
  end

  assign det_n = ~(node & en & gate);

  // SR latch: S-bar = det_n, R-bar = rst_n
  always_latch begin
    if (!rst_n)      hit = 1'b0;
    else if (!det_n) hit = 1'b1;
  end

  // the hit bit may only be cleared by RESET
  always @(negedge hit) begin
    assert (!rst_n) else $error("pixel hit latch cleared without RESET");
  end
endmodule
