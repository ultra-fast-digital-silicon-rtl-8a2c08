`timescale 1ps / 1ps
// tdc_model: behavioural time-to-digital converter used by the top-level
// testbench in place of the chip's TDCs, whose circuit is not part of this RTL.
//
// A rising edge on start begins a measurement, a rising edge on stop ends it and
// value becomes the elapsed time in units of RES_PS (100 ps), saturated to W bits.
// With RESTART = 0 only the first start after clr counts (first-photon TDC); with
// RESTART = 1 every start edge restarts the measurement, so the last one before
// stop wins (last-photon TDC). clr high clears value and disarms. value stays 0
// if no start was seen.
module tdc_model #(
  parameter int unsigned RES_PS  = 100,
  parameter int unsigned W       = 12,
  parameter bit          RESTART = 1'b0
) (
  input  logic         start,
  input  logic         stop,
  input  logic         clr,
  output logic [W-1:0] value
);
  time t0;
  bit  running = 1'b0;
  bit  done = 1'b0;

  initial value = '0;

  always @(posedge start) begin
    if (!clr && !done && (!running || RESTART)) begin
      t0 = $time;
      running = 1'b1;
    end
  end

  always @(posedge stop) begin
    if (running) begin
      longint unsigned n;
      n = ($time - t0) / RES_PS;
      value = (n > (2**W - 1)) ? W'(2**W - 1) : W'(n);
      running = 1'b0;
      done = 1'b1;
    end
  end

  always @(posedge clr) begin
    running = 1'b0;
    done = 1'b0;
    value = '0;
  end
endmodule
