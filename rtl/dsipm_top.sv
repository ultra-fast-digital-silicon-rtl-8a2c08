`timescale 1ps / 1ps
// dsipm_top: digital silicon photomultiplier of 32 x 32 SPAD microcells that
// counts the photons of a light flash (energy) and marks the first and last photon
// in time.
//
// The array is cut into 16 double rows of 64 pixels. Energy path: each pixel that
// fires inside the GATE window sets its hit latch; each double row counts its
// hits with a parallel counter (7 bits) and an adder tree sums the 16 counts into
// the 11-bit photon count. Timing path: each firing pixel also emits a 400 ps
// negative pulse; the local tree of each double row and a 16-input peripheral tree
// OR all pulses into the global timing signal, which rises with the first photon
// and falls 400 ps after the last. The falling edge starts the last-photon TDC;
// the first-photon TDC is started through a trigger selector (direct,
// time-over-threshold or spatial coincidence). A 10-bit counter counts rising
// edges of the timing signal. The two TDCs are not part of this RTL: their start
// signals leave as tdc_first_trig / tdc_last_trig and their 12-bit results come
// back on tdc_first_data / tdc_last_data. A PISO register loads the 45-bit frame
// {energy, tdc_first, tdc_last, events} and shifts it out MSB first on sdo.
//
// Configuration (all on cfg_clk, MSB of each register shifted in first):
// col_sdi fills the 32-bit column register (enable data), row_sdi the 32-bit row
// register (which rows are written), ctrl_sdi the 6-bit control register
// {mode[1:0], tot_code[2:0], coinc3}. While cfg_wr is high, every pixel of a
// selected row stores its column bit as its enable. The write strobe, register
// protocol and frame layout are choices of this implementation; the partition and
// all sizes follow the design. Pixel p = row*32 + col of photon[] is the SPAD
// stimulus of the behavioural SPAD models.
module dsipm_top
  import dsipm_pkg::*;
#(
  parameter int unsigned T_MONO_PS    = 400,
  parameter int unsigned DEAD_TIME_PS = 8000
) (
  // light and acquisition control
  input  logic [N_PIX-1:0]    photon,
  input  logic                gate,
  input  logic                test_n,
  input  logic                rst_n,
  // configuration
  input  logic                cfg_clk,
  input  logic                col_sdi,
  input  logic                row_sdi,
  input  logic                ctrl_sdi,
  input  logic                cfg_wr,
  // external TDCs
  output logic                tdc_first_trig,
  output logic                tdc_last_trig,
  input  logic [TDC_W-1:0]    tdc_first_data,
  input  logic [TDC_W-1:0]    tdc_last_data,
  // results and readout
  output logic [ENERGY_W-1:0] energy,
  output logic [EVCNT_W-1:0]  events,
  input  logic                cnt_rst_n,
  input  logic                clk,
  input  logic                piso_load,
  output logic                sdo
);
  logic [COLS-1:0] col_q, row_q;
  logic [CTRL_W-1:0] ctrl_q;
  logic col_sdo, row_sdo, ctrl_sdo;

  shift_reg #(.W(COLS)) u_col_reg  (.clk(cfg_clk), .sdi(col_sdi),  .q(col_q),  .sdo(col_sdo));
  shift_reg #(.W(ROWS)) u_row_reg  (.clk(cfg_clk), .sdi(row_sdi),  .q(row_q),  .sdo(row_sdo));
  shift_reg #(.W(CTRL_W)) u_ctrl_reg (.clk(cfg_clk), .sdi(ctrl_sdi), .q(ctrl_q), .sdo(ctrl_sdo));

  logic [ROWS-1:0] row_wr;
  assign row_wr = row_q & {ROWS{cfg_wr}};

  // ---------------- pixel array: 16 double rows ----------------
  logic [N_DROWS-1:0]                 local_n;
  logic [N_DROWS-1:0][DROW_CNT_W-1:0] drow_count;
  logic [N_PIX-1:0]                   hits;

  for (genvar d = 0; d < N_DROWS; d++) begin : g_drow
    double_row #(
      .COLS(COLS), .T_MONO_PS(T_MONO_PS), .DEAD_TIME_PS(DEAD_TIME_PS)
    ) u_drow (
      .photon  (photon[d*DROW_PIX +: DROW_PIX]),
      .row_wr  (row_wr[2*d +: 2]),
      .col_data(col_q),
      .gate    (gate),
      .test_n  (test_n),
      .rst_n   (rst_n),
      .local_n (local_n[d]),
      .count   (drow_count[d]),
      .hits    (hits[d*DROW_PIX +: DROW_PIX])
    );
  end

  // ---------------- energy path ----------------
  adder_tree #(.N_IN(N_DROWS), .IN_W(DROW_CNT_W), .OUT_W(ENERGY_W)) u_adders (
    .in(drow_count), .sum(energy)
  );

  // ---------------- timing path ----------------
  logic timing;

  nand_nor_tree #(.N_IN(N_DROWS), .INVERT_OUT(1'b1)) u_periph_tree (
    .in_n(local_n), .out(timing)
  );

  trigger_select #(.N_DR(N_DROWS)) u_trig (
    .tree_out(timing), .local_n(local_n), .ctrl(ctrl_t'(ctrl_q)), .trig(tdc_first_trig)
  );

  assign tdc_last_trig = timing;

  logic ev_full;
  event_counter #(.W(EVCNT_W)) u_evcnt (
    .tree_out(timing), .rst_n(cnt_rst_n), .count(events), .full(ev_full)
  );

  // ---------------- readout ----------------
  frame_t frame;
  assign frame = '{energy: energy, tdc_first: tdc_first_data,
                   tdc_last: tdc_last_data, events: events};

  piso #(.W(FRAME_W)) u_piso (
    .clk(clk), .load(piso_load), .din(frame), .sdo(sdo)
  );

  // the chained serial outputs, the hit map and the saturation flag are not used
  // at this level
  logic unused;
  assign unused = col_sdo ^ row_sdo ^ ctrl_sdo ^ ev_full ^ (^hits);
endmodule
