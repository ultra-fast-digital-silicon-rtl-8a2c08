`timescale 1ps / 1ps
// nand_nor_tree: balanced tree of two-input gates that merges the active-low
// monostable pulses of many pixels into one timing signal.
//
// Following the design, levels alternate between NAND and NOR, starting with NAND
// on the active-low pulses, and the depth is log2(N_IN): 6 levels for the 64
// inputs of a double row, 4 levels for the 16-input peripheral tree. A NAND of
// two active-low signals is an active-high OR, a NOR of two active-high signals an
// active-low OR, so every level keeps the meaning "some input pulse is present"
// and only the polarity alternates. With an even depth the output is active low;
// INVERT_OUT adds one inverting stage so that the peripheral tree yields the
// active-high global signal (the function of a 1024-input NAND). That output
// stage is this implementation's choice, needed to match the stated polarity.
//
// Interface: in_n[N_IN-1:0] (N_IN a power of two) -> out. Combinational; the
// delay balancing of the physical tree is a layout matter and not modelled.
module nand_nor_tree #(
  parameter int unsigned N_IN       = 64,
  parameter bit          INVERT_OUT = 1'b0
) (
  input  logic [N_IN-1:0] in_n,
  output logic            out
);
  localparam int unsigned LV = $clog2(N_IN);

  if ((1 << LV) != N_IN) begin : g_bad_size
    $error("nand_nor_tree: N_IN must be a power of two");
  end

  // node[j] holds the N_IN >> j signals entering level j.
  logic [LV:0][N_IN-1:0] node;

  assign node[0] = in_n;

  for (genvar j = 0; j < LV; j++) begin : g_lvl
    localparam int unsigned NG = N_IN >> (j + 1);
    for (genvar g = 0; g < NG; g++) begin : g_gate
      if (j % 2 == 0) begin : g_nand
        assign node[j+1][g] = ~(node[j][2*g] & node[j][2*g+1]);
      end else begin : g_nor
        assign node[j+1][g] = ~(node[j][2*g] | node[j][2*g+1]);
      end
    end
    assign node[j+1][N_IN-1:NG] = '0;
  end

  assign out = INVERT_OUT ? ~node[LV][0] : node[LV][0];

  logic unused_top;
  assign unused_top = ^node[LV][N_IN-1:1];
endmodule
