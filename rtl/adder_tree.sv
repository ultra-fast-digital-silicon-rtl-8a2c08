`timescale 1ps / 1ps
// adder_tree: sums the 7-bit words of the sixteen parallel counters into the
// 11-bit photon count, outside the array.
//
// The design only says the tree was synthesized for low gate count and speed; this
// implementation uses a balanced binary tree, log2(N_IN) levels of two-input
// adders (4 levels for 16 inputs). Every node is carried at the output width and
// synthesis trims the unused upper bits.
//
// Interface: in[N_IN] of IN_W bits -> sum[OUT_W-1:0]. Purely combinational.
module adder_tree #(
  parameter int unsigned N_IN  = 16,
  parameter int unsigned IN_W  = 7,
  parameter int unsigned OUT_W = 11
) (
  input  logic [N_IN-1:0][IN_W-1:0] in,
  output logic [OUT_W-1:0]          sum
);
  localparam int unsigned LV = $clog2(N_IN);
  localparam int unsigned NP = 1 << LV;   // inputs padded to a power of two

  logic [LV:0][NP-1:0][OUT_W-1:0] node;

  for (genvar i = 0; i < NP; i++) begin : g_in
    if (i < N_IN) begin : g_used
      assign node[0][i] = OUT_W'(in[i]);
    end else begin : g_pad
      assign node[0][i] = '0;
    end
  end

  for (genvar j = 0; j < LV; j++) begin : g_lvl
    localparam int unsigned NA = NP >> (j + 1);
    for (genvar a = 0; a < NA; a++) begin : g_add
      assign node[j+1][a] = node[j][2*a] + node[j][2*a+1];
    end
    assign node[j+1][NP-1:NA] = '0;
  end

  assign sum = node[LV][0];

  logic unused_top;
  assign unused_top = ^node[LV][NP-1:1];
endmodule
