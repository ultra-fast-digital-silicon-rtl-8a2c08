`timescale 1ps / 1ps
// double_row: two adjacent rows of 32 microcells with the electronics that sits
// between them in the array: the 64-input local timing tree and the 64-input
// parallel counter.
//
// Each pixel is a SPAD model (spad_quench), its digital front end
// (pixel_frontend) and its 400 ps monostable. The hit bits of all 64 pixels go to
// the parallel counter, which gives their number as a 7-bit word; the monostable
// pulses go to the local tree, whose output local_n is low while any pulse in the
// double row is present. Pixel index p = r*COLS + c for row r (0 or 1) and column
// c. This partition is the design's; the index order is this implementation's.
//
// Interface: photon[63:0] stimulus, row_wr[1:0] word lines, col_data[31:0] enable
// data, gate, test_n, rst_n -> local_n, count[6:0], hits[63:0]. count follows the
// hit bits combinationally.
module double_row #(
  parameter int unsigned COLS         = 32,
  parameter int unsigned T_MONO_PS    = 400,
  parameter int unsigned DEAD_TIME_PS = 8000,
  localparam int unsigned NP          = 2 * COLS,
  localparam int unsigned CW          = $clog2(NP + 1)
) (
  input  logic [NP-1:0]   photon,
  input  logic [1:0]      row_wr,
  input  logic [COLS-1:0] col_data,
  input  logic            gate,
  input  logic            test_n,
  input  logic            rst_n,
  output logic            local_n,
  output logic [CW-1:0]   count,
  output logic [NP-1:0]   hits
);
  logic [NP-1:0] node, en, det_n, pulse_n;

  for (genvar r = 0; r < 2; r++) begin : g_row
    for (genvar c = 0; c < COLS; c++) begin : g_col
      localparam int unsigned P = r * COLS + c;

      spad_quench #(.DEAD_TIME_PS(DEAD_TIME_PS)) u_spad (
        .photon(photon[P]), .en(en[P]), .test_n(test_n), .node(node[P])
      );

      pixel_frontend u_fe (
        .node (node[P]), .gate(gate), .rst_n(rst_n),
        .wr   (row_wr[r]), .wdata(col_data[c]),
        .en   (en[P]), .det_n(det_n[P]), .hit(hits[P])
      );

      monostable #(.T_MONO_PS(T_MONO_PS)) u_mono (
        .trig_n(det_n[P]), .pulse_n(pulse_n[P])
      );
    end
  end

  nand_nor_tree #(.N_IN(NP), .INVERT_OUT(1'b0)) u_local_tree (
    .in_n(pulse_n), .out(local_n)
  );

  parallel_counter #(.N(NP)) u_pc (
    .in(hits), .count(count)
  );
endmodule
