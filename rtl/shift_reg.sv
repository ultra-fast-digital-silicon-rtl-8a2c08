`timescale 1ps / 1ps
// shift_reg: serial-in, parallel-out configuration register.
//
// Used for the 32-bit row register (word lines of the in-pixel enable memories),
// the 32-bit column register (the data they store) and the trigger control
// register. On each rising edge of clk, sdi enters bit 0 and the content moves
// one place towards the MSB; after W clocks the first bit shifted in is in
// q[W-1]. sdo = q[W-1] allows registers to be chained. There is no reset: the
// registers are written before use. Shift direction is this implementation's
// choice.
module shift_reg #(
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic         sdi,
  output logic [W-1:0] q,
  output logic         sdo
);
  always_ff @(posedge clk) q <= {q[W-2:0], sdi};

  assign sdo = q[W-1];
endmodule
