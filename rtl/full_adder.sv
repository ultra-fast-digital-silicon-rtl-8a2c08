`timescale 1ps / 1ps
// full_adder: one-bit full adder, the 3:2 cell of the parallel counter's
// compressor levels. sum has the weight of the inputs, cout twice that weight.
// Purely combinational.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic sum,
  output logic cout
);
  assign sum  = a ^ b ^ c;
  assign cout = (a & b) | (a & c) | (b & c);
endmodule
