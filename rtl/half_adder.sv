`timescale 1ps / 1ps
// half_adder: one-bit half adder, the 2:2 cell used by a compressor level when
// two bits are left over after grouping its inputs in threes. Combinational.
module half_adder (
  input  logic a,
  input  logic b,
  output logic sum,
  output logic cout
);
  assign sum  = a ^ b;
  assign cout = a & b;
endmodule
