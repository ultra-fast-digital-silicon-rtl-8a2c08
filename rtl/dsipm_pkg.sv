`timescale 1ps / 1ps
// dsipm_pkg: types, constants and elaboration-time helper functions shared by the
// digital SiPM modules.
//
// The array is 32 x 32 SPADs read as 16 "double rows" of 64 pixels. Each double
// row has its own parallel counter (7-bit result) and local timing tree; the
// sixteen counts are summed into an 11-bit photon count. These numbers are the
// design's own. The trigger control word layout (ctrl_t) and the mode encoding
// are choices of this implementation: the design only says that the trigger mode,
// the ToT threshold (3 bits) and the number of coincident double rows are held in
// a programmable register.
//
// The compressor functions describe the parallel counter's adder network: a level
// of M bits uses floor(M/3) full adders, one half adder if two bits are left over,
// and passes a single left-over bit straight on. Its sums feed the next level, its
// carries join the carry vector that feeds the next compressor.
package dsipm_pkg;

  localparam int unsigned ROWS       = 32;
  localparam int unsigned COLS       = 32;
  localparam int unsigned N_PIX      = ROWS * COLS;       // 1024
  localparam int unsigned DROW_PIX   = 2 * COLS;          // 64 pixels per double row
  localparam int unsigned N_DROWS    = ROWS / 2;          // 16
  localparam int unsigned DROW_CNT_W = 7;                 // parallel counter word
  localparam int unsigned ENERGY_W   = 11;                // total photon count
  localparam int unsigned TDC_W      = 12;                // each TDC result
  localparam int unsigned EVCNT_W    = 10;                // trigger event counter
  localparam int unsigned FRAME_W    = ENERGY_W + 2 * TDC_W + EVCNT_W;  // 45
  localparam int unsigned CTRL_W     = 6;

  // First-photon TDC trigger modes.
  typedef enum logic [1:0] {
    TRIG_DIRECT = 2'd0,   // rising edge of the global timing signal
    TRIG_TOT    = 2'd1,   // time-over-threshold filtered
    TRIG_COINC  = 2'd2    // spatial coincidence of adjacent double rows
  } trig_mode_e;

  // Trigger control register, MSB first as shifted in.
  typedef struct packed {
    logic [1:0] mode;       // trig_mode_e value; 2'd3 behaves as TRIG_DIRECT
    logic [2:0] tot_code;   // ToT delay = 600 ps + 100 ps * tot_code
    logic       coinc3;     // 0: two adjacent double rows, 1: three
  } ctrl_t;

  // Readout frame loaded into the PISO register (MSB shifted out first).
  typedef struct packed {
    logic [ENERGY_W-1:0] energy;
    logic [TDC_W-1:0]    tdc_first;
    logic [TDC_W-1:0]    tdc_last;
    logic [EVCNT_W-1:0]  events;
  } frame_t;

  // ---- parallel counter geometry (elaboration time only) ----

  // Bits left after one compression level of m bits.
  function automatic int unsigned lvl_out(int unsigned m);
    return m / 3 + ((m % 3) != 0 ? 1 : 0);
  endfunction

  // Carries produced by one compression level of m bits.
  function automatic int unsigned lvl_carries(int unsigned m);
    return m / 3 + ((m % 3) == 2 ? 1 : 0);
  endfunction

  // Width entering level j (j = 0 is the compressor input).
  function automatic int unsigned lvl_width(int unsigned m, int unsigned j);
    int unsigned w = m;
    for (int unsigned i = 0; i < j; i++) w = lvl_out(w);
    return w;
  endfunction

  // Number of levels a compressor of m inputs needs to reach one bit.
  function automatic int unsigned comp_levels(int unsigned m);
    int unsigned w = m;
    int unsigned l = 0;
    while (w > 1) begin
      w = lvl_out(w);
      l++;
    end
    return l;
  endfunction

  // Position in the carry vector of the first carry of level j.
  function automatic int unsigned carry_offset(int unsigned m, int unsigned j);
    int unsigned w = m;
    int unsigned o = 0;
    for (int unsigned i = 0; i < j; i++) begin
      o += lvl_carries(w);
      w = lvl_out(w);
    end
    return o;
  endfunction

  // Total carry-vector width of a compressor of m inputs.
  function automatic int unsigned comp_carries(int unsigned m);
    return carry_offset(m, comp_levels(m));
  endfunction

  // Input width of compressor k (k = 0 is the first) of an n-input counter.
  function automatic int unsigned pc_stage_width(int unsigned n, int unsigned k);
    int unsigned w = n;
    for (int unsigned i = 0; i < k; i++) w = comp_carries(w);
    return w;
  endfunction

  // Number of compressors: stop once the carry vector is a single bit.
  function automatic int unsigned pc_num_comp(int unsigned n);
    int unsigned w = n;
    int unsigned k = 0;
    do begin
      w = comp_carries(w);
      k++;
    end while (w > 1);
    return k;
  endfunction

endpackage
