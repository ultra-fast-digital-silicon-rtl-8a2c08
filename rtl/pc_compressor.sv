`timescale 1ps / 1ps
// pc_compressor: one binary compressor of the parallel counter.
//
// M bits of equal weight are reduced to a single bit (the compressor's binary
// output) through L = ceil(log3 M) levels. At each level the bits are taken in
// groups of three by full adders; a left-over pair goes to a half adder and a
// single left-over bit passes to the next level unchanged. Sums move on to the
// next level; every carry produced at any level is collected, level 1 first, into
// the carry vector, whose bits weigh twice the inputs and which feeds the next
// compressor. The level structure and the full/half adder split follow the
// design; the ordering of carry-vector bits is this implementation's choice.
//
// Interface: in[M-1:0] -> bin, carry[CW-1:0] with CW = comp_carries(M) (a
// one-bit zero when M = 1). Purely combinational, no clock.
module pc_compressor
  import dsipm_pkg::*;
#(
  parameter  int unsigned M   = 8,
  localparam int unsigned CWP = (comp_carries(M) > 0) ? comp_carries(M) : 1
) (
  input  logic [M-1:0]  in,
  output logic          bin,
  output logic [CWP-1:0] carry
);
  localparam int unsigned L   = comp_levels(M);
  localparam int unsigned CW  = comp_carries(M);

  // lv[j] holds the bits entering level j; lv[L][0] is the binary output.
  logic [L:0][M-1:0] lv;

  assign lv[0] = in;

  for (genvar j = 0; j < L; j++) begin : g_lvl
    localparam int unsigned W   = lvl_width(M, j);
    localparam int unsigned NFA = W / 3;
    localparam int unsigned OFF = carry_offset(M, j);
    localparam int unsigned WO  = lvl_out(W);

    for (genvar i = 0; i < NFA; i++) begin : g_fa
      full_adder u_fa (
        .a(lv[j][3*i]), .b(lv[j][3*i+1]), .c(lv[j][3*i+2]),
        .sum(lv[j+1][i]), .cout(carry[OFF+i])
      );
    end
    if (W % 3 == 2) begin : g_ha
      half_adder u_ha (
        .a(lv[j][W-2]), .b(lv[j][W-1]),
        .sum(lv[j+1][NFA]), .cout(carry[OFF+NFA])
      );
    end else if (W % 3 == 1) begin : g_pass
      assign lv[j+1][NFA] = lv[j][W-1];
    end
    if (WO < M) begin : g_zero
      assign lv[j+1][M-1:WO] = '0;
    end
  end

  assign bin = lv[L][0];

  if (CW == 0) begin : g_nocarry
    assign carry = 1'b0;
  end
endmodule
