`timescale 1ps / 1ps
// tb_dsipm_top: end-to-end test of the whole SiPM at its full size (32 x 32
// pixels, default parameters), with behavioural TDCs on its trigger outputs.
//
// Each acquisition writes the pixel enables through the row/column registers,
// sets the trigger mode through the control register, clears the pixels, opens
// GATE, fires photons at chosen pixels and times, ends with a STOP edge to the
// TDCs, loads the PISO register and reads the 45-bit frame serially. Expected
// values are worked out here from the photon list alone, on a 10 ps time grid:
// the photon count (distinct enabled pixels fired inside GATE), the global timing
// signal (any 400 ps pulse active), its rising edges (event counter), the
// first-photon trigger for the selected mode, and the two TDC codes.
//
// Scenarios: bursts of 1, 10, 50, 100 photons in 5 ns and all 1024 pixels;
// disabled pixels; photons outside GATE; a photon lost in the dead time; TEST
// injection; writing all rows at once; ToT rejection and acceptance for every threshold code; coincidence
// of two and three adjacent double rows, accepted and rejected; event counter
// saturation; and single-pixel stimulation of all 1024 pixels to check that the
// timing tree responds identically to each. Every mechanism is counted and a
// mechanism never exercised counts as a failure.
module tb_dsipm_top;
  import dsipm_pkg::*;

  int checks = 0, failures = 0;

  // readout clock, 100 MHz
  logic clk = 1'b0;
  always #5000 clk = ~clk;

  logic [N_PIX-1:0] photon = '0;
  logic gate = 1'b0, test_n = 1'b1, rst_n = 1'b1;
  logic cfg_clk = 1'b0, col_sdi = 1'b0, row_sdi = 1'b0, ctrl_sdi = 1'b0, cfg_wr = 1'b0;
  logic tdc_first_trig, tdc_last_trig;
  logic [TDC_W-1:0] tdc_first_data, tdc_last_data;
  logic [ENERGY_W-1:0] energy;
  logic [EVCNT_W-1:0] events;
  logic cnt_rst_n = 1'b1, piso_load = 1'b0, sdo;
  logic stop = 1'b0, tdc_clr = 1'b1;

  dsipm_top dut (
    .photon(photon), .gate(gate), .test_n(test_n), .rst_n(rst_n),
    .cfg_clk(cfg_clk), .col_sdi(col_sdi), .row_sdi(row_sdi), .ctrl_sdi(ctrl_sdi), .cfg_wr(cfg_wr),
    .tdc_first_trig(tdc_first_trig), .tdc_last_trig(tdc_last_trig),
    .tdc_first_data(tdc_first_data), .tdc_last_data(tdc_last_data),
    .energy(energy), .events(events), .cnt_rst_n(cnt_rst_n),
    .clk(clk), .piso_load(piso_load), .sdo(sdo));

  tdc_model #(.RES_PS(100), .W(TDC_W), .RESTART(1'b0)) u_tdc_first (
    .start(tdc_first_trig), .stop(stop), .clr(tdc_clr), .value(tdc_first_data));
  tdc_model #(.RES_PS(100), .W(TDC_W), .RESTART(1'b1)) u_tdc_last (
    .start(~tdc_last_trig), .stop(stop), .clr(tdc_clr), .value(tdc_last_data));

  // ---------------- mechanism counters ----------------
  typedef enum int {
    M_COUNT, M_FULL_SCALE, M_DIRECT, M_TOT_REJECT, M_TOT_ACCEPT, M_COINC2_ACCEPT,
    M_COINC2_REJECT, M_COINC3_ACCEPT, M_COINC3_REJECT, M_DISABLED, M_GATE_REJECT,
    M_DEAD_TIME, M_TEST, M_EV_SATURATE, M_PISO, M_SINGLE_PIXEL, M_GROUP_CFG, M_NUM
  } mech_e;
  int mech[M_NUM];
  string mech_name[M_NUM] = '{"count", "full_scale_1024", "direct_trigger", "tot_reject",
    "tot_accept", "coinc2_accept", "coinc2_reject", "coinc3_accept", "coinc3_reject",
    "disabled_pixel", "gate_reject", "dead_time_loss", "test_injection",
    "event_counter_saturation", "piso_frame", "single_pixel_uniform", "group_config"};

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", msg);
    end
  endtask

  // ---------------- configuration ----------------
  // Shifts col/row words into their registers (MSB first) and the 6-bit control
  // word into the control register in the same 32 clocks.
  task automatic cfg_shift(logic [31:0] col, logic [31:0] row, logic [5:0] ctrl);
    for (int i = 31; i >= 0; i--) begin
      col_sdi = col[i];
      row_sdi = row[i];
      ctrl_sdi = (i < 6) ? ctrl[i] : 1'b0;
      #500 cfg_clk = 1'b1;
      #500 cfg_clk = 1'b0;
    end
  endtask

  logic [N_PIX-1:0] en_map;
  ctrl_t ctrl_cur;

  task automatic write_enables(logic [N_PIX-1:0] m);
    for (int r = 0; r < ROWS; r++) begin
      cfg_shift(m[r*COLS +: COLS], 32'd1 << r, ctrl_cur);
      #100 cfg_wr = 1'b1;
      #100 cfg_wr = 1'b0;
    end
    en_map = m;
  endtask

  task automatic set_ctrl(ctrl_t c);
    ctrl_cur = c;
    cfg_shift('0, '0, c);
  endtask

  // ---------------- photon list and expected results ----------------
  int ph_pix[$];
  int ph_t[$];     // ps after the start of the window, multiples of 30

  localparam int GRID = 10;
  localparam int SPAN = 9000;   // ps examined after the window start

  task automatic expected(ctrl_t c, output int n_hit, output int t_first, output int t_last,
                          output int n_events, output int t_trig);
    bit [N_PIX-1:0] seen;
    bit prev_timing = 0;
    int thr = 600 + 100 * int'(c.tot_code);
    bit act_hist[int];
    int first_t[int];   // a pixel fires once: later photons fall in its dead time
    seen = '0;
    n_hit = 0;
    t_first = -1;
    t_last = -1;
    n_events = 0;
    t_trig = -1;
    foreach (ph_pix[i]) begin
      if (!first_t.exists(ph_pix[i]) || ph_t[i] < first_t[ph_pix[i]]) first_t[ph_pix[i]] = ph_t[i];
    end
    foreach (ph_pix[i]) begin
      if (en_map[ph_pix[i]] && !seen[ph_pix[i]]) begin
        seen[ph_pix[i]] = 1'b1;
        n_hit++;
        if (t_first < 0 || first_t[ph_pix[i]] < t_first) t_first = first_t[ph_pix[i]];
        if (first_t[ph_pix[i]] > t_last) t_last = first_t[ph_pix[i]];
      end
    end
    for (int t = 0; t < SPAN; t += GRID) begin
      bit [N_DROWS-1:0] ract;
      bit timing, trig;
      ract = '0;
      foreach (ph_pix[i]) begin
        if (en_map[ph_pix[i]] && ph_t[i] == first_t[ph_pix[i]] && t >= ph_t[i] && t < ph_t[i] + 400)
          ract[ph_pix[i] / DROW_PIX] = 1'b1;
      end
      timing = |ract;
      act_hist[t] = timing;
      if (timing && !prev_timing) n_events++;
      prev_timing = timing;
      case (c.mode)
        TRIG_TOT:   trig = timing && (t >= thr) && act_hist[t - thr];
        TRIG_COINC: begin
          trig = 0;
          for (int d = 0; d + (c.coinc3 ? 2 : 1) < N_DROWS; d++)
            if (ract[d] && ract[d+1] && (!c.coinc3 || ract[d+2])) trig = 1;
        end
        default:    trig = timing;
      endcase
      if (trig && t_trig < 0) t_trig = t;
    end
  endtask

  // ---------------- one acquisition ----------------
  int last_energy, last_first, last_last, last_trig;

  task automatic acquire(string tag, bit clear_events = 1'b1);
    int n_hit, t_first, t_last, n_events, t_trig, ev_before;
    int exp_first, exp_last, exp_events, t0;
    logic [FRAME_W-1:0] got;
    frame_t f;
    int idx[$];
    expected(ctrl_cur, n_hit, t_first, t_last, n_events, t_trig);
    tdc_clr = 1'b1;
    rst_n = 1'b0;
    if (clear_events) begin
      cnt_rst_n = 1'b0;
      #100 cnt_rst_n = 1'b1;
    end
    #100 rst_n = 1'b1;
    tdc_clr = 1'b0;
    ev_before = int'(events);
    #100 gate = 1'b1;
    #1000;
    t0 = int'($time);
    // photons on a 30 ps raster, each a 15 ps pulse
    for (int t = 0; t <= 6000; t += 30) begin
      idx = ph_t.find_index() with (item == t);
      foreach (idx[k]) photon[ph_pix[idx[k]]] = 1'b1;
      #15 photon = '0;
      #15;
    end
    #(20000 - 6030);
    stop = 1'b1;                    // STOP 20 ns after the window start
    #100 stop = 1'b0;
    gate = 1'b0;
    #1000;
    // expected TDC codes: time from the start edge to STOP, in 100 ps units
    exp_first = (t_trig < 0) ? 0 : (20000 - t_trig) / 100;
    exp_last  = (t_last < 0) ? 0 : (20000 - (t_last + 400)) / 100;
    exp_events = clear_events ? n_events : ev_before + n_events;
    if (exp_events > 1023) exp_events = 1023;
    check(int'(energy) == n_hit, $sformatf("%s: energy %0d expected %0d", tag, energy, n_hit));
    check(int'(events) == exp_events, $sformatf("%s: events %0d expected %0d", tag, events, exp_events));
    check(int'(tdc_first_data) == exp_first,
          $sformatf("%s: TDC first %0d expected %0d", tag, tdc_first_data, exp_first));
    check(int'(tdc_last_data) == exp_last,
          $sformatf("%s: TDC last %0d expected %0d", tag, tdc_last_data, exp_last));
    // serial readout of the frame
    @(negedge clk) piso_load = 1'b1;
    @(negedge clk) piso_load = 1'b0;
    for (int i = FRAME_W - 1; i >= 0; i--) begin
      got[i] = sdo;
      @(negedge clk);
    end
    f = frame_t'(got);
    check(int'(f.energy) == n_hit && int'(f.tdc_first) == exp_first &&
          int'(f.tdc_last) == exp_last && int'(f.events) == exp_events,
          $sformatf("%s: serial frame %h", tag, got));
    mech[M_PISO]++;
    if (n_hit > 0) mech[M_COUNT]++;
    last_energy = n_hit;
    last_first = exp_first;
    last_last = exp_last;
    last_trig = t_trig;
    ph_pix.delete();
    ph_t.delete();
    #9000;    // SPADs recover
  endtask

  // n distinct random pixels (from the enabled set if only_en) in [0, win) ps
  task automatic random_burst(int n, int win, bit only_en = 1'b1);
    bit [N_PIX-1:0] used;
    used = '0;
    while (ph_pix.size() < n) begin
      int p = $urandom_range(N_PIX - 1);
      if (!used[p] && (!only_en || en_map[p])) begin
        used[p] = 1'b1;
        ph_pix.push_back(p);
        ph_t.push_back(30 * $urandom_range(win / 30 - 1));
      end
    end
  endtask

  // ---------------- watchdog ----------------
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- stimulus ----------------
  initial begin
    ctrl_t c;
    int sizes[5] = '{1, 10, 50, 100, 1024};

    c = '{mode: TRIG_DIRECT, tot_code: 3'd0, coinc3: 1'b0};
    set_ctrl(c);
    write_enables('1);

    // bursts of photons inside 5 ns, direct trigger
    foreach (sizes[s]) begin
      random_burst(sizes[s], 5010);
      acquire($sformatf("burst %0d", sizes[s]));
      check(last_energy == sizes[s], "burst size counted");
      if (last_trig >= 0) mech[M_DIRECT]++;
      if (sizes[s] == 1024 && last_energy == 1024) mech[M_FULL_SCALE]++;
    end

    // noisy pixels disabled: about one in eight
    begin
      logic [N_PIX-1:0] m;
      for (int i = 0; i < N_PIX; i++) m[i] = ($urandom_range(7) != 0);
      write_enables(m);
      random_burst(200, 5010, 1'b0);
      begin
        int n_dis = 0;
        foreach (ph_pix[i]) if (!m[ph_pix[i]]) n_dis++;
        if (n_dis > 0) mech[M_DISABLED]++;
        acquire("disabled pixels");
        check(last_energy == 200 - n_dis, "disabled pixels not counted");
      end
      write_enables('1);
    end

    // photon outside GATE
    rst_n = 1'b0;
    #100 rst_n = 1'b1;
    photon[100] = 1'b1;
    #15 photon = '0;
    #1000;
    check(energy == 0 && tdc_last_trig == 1'b0, "photon outside GATE ignored");
    if (energy == 0) mech[M_GATE_REJECT]++;
    #9000;

    // second photon on the same pixel within the dead time
    ph_pix.push_back(321); ph_t.push_back(0);
    ph_pix.push_back(321); ph_t.push_back(3000);
    ph_pix.push_back(322); ph_t.push_back(1500);
    acquire("dead time");
    check(last_energy == 2, "dead-time photon not counted");
    begin
      // the lost photon must not move the last timestamp either
      int exp_last = (20000 - (1500 + 400)) / 100;
      check(last_last == exp_last, "dead-time photon not timestamped");
      if (last_energy == 2 && last_last == exp_last) mech[M_DEAD_TIME]++;
    end

    // time-over-threshold: every code, single photon rejected, dense burst accepted
    for (int code = 0; code < 8; code++) begin
      c = '{mode: TRIG_TOT, tot_code: 3'(code), coinc3: 1'b0};
      set_ctrl(c);
      ph_pix.push_back($urandom_range(N_PIX - 1)); ph_t.push_back(600);
      acquire($sformatf("tot %0d single", code));
      check(last_first == 0, "ToT rejects a single photon");
      if (last_first == 0) mech[M_TOT_REJECT]++;
      // photons every 300 ps for 1.8 ns: the signal stays high about 2.2 ns
      for (int k = 0; k < 7; k++) begin
        ph_pix.push_back(64 * k + 3);
        ph_t.push_back(300 + 300 * k);
      end
      acquire($sformatf("tot %0d burst", code));
      check(last_trig == 300 + 600 + 100 * code, "ToT trigger one threshold after the first photon");
      if (last_first != 0) mech[M_TOT_ACCEPT]++;
    end

    // spatial coincidence of two adjacent double rows
    c = '{mode: TRIG_COINC, tot_code: 3'd0, coinc3: 1'b0};
    set_ctrl(c);
    ph_pix.push_back(0 * 64 + 10); ph_t.push_back(300);   // double rows 0 and 2
    ph_pix.push_back(2 * 64 + 10); ph_t.push_back(330);
    acquire("coinc2 non-adjacent");
    check(last_first == 0, "coinc2 rejects non-adjacent rows");
    if (last_first == 0) mech[M_COINC2_REJECT]++;
    ph_pix.push_back(3 * 64 + 5);  ph_t.push_back(300);   // double rows 3 and 4
    ph_pix.push_back(4 * 64 + 40); ph_t.push_back(540);
    acquire("coinc2 adjacent");
    check(last_trig == 540, "coinc2 triggers on the second row");
    if (last_first != 0) mech[M_COINC2_ACCEPT]++;
    ph_pix.push_back(7 * 64 + 5);  ph_t.push_back(300);   // adjacent, too far apart in time
    ph_pix.push_back(8 * 64 + 9);  ph_t.push_back(900);
    acquire("coinc2 late");
    check(last_first == 0, "coinc2 needs overlap within 400 ps");
    if (last_first == 0) mech[M_COINC2_REJECT]++;

    // three adjacent double rows
    c = '{mode: TRIG_COINC, tot_code: 3'd0, coinc3: 1'b1};
    set_ctrl(c);
    ph_pix.push_back(5 * 64 + 1);  ph_t.push_back(300);
    ph_pix.push_back(6 * 64 + 2);  ph_t.push_back(330);
    acquire("coinc3 pair");
    check(last_first == 0, "coinc3 rejects a pair");
    if (last_first == 0) mech[M_COINC3_REJECT]++;
    ph_pix.push_back(13 * 64 + 1); ph_t.push_back(300);
    ph_pix.push_back(14 * 64 + 2); ph_t.push_back(360);
    ph_pix.push_back(15 * 64 + 3); ph_t.push_back(420);
    acquire("coinc3 triple");
    check(last_trig == 420, "coinc3 triggers on the third row");
    if (last_first != 0) mech[M_COINC3_ACCEPT]++;

    // TEST injection on a subset of pixels
    c = '{mode: TRIG_DIRECT, tot_code: 3'd0, coinc3: 1'b0};
    set_ctrl(c);
    begin
      // group write: every row at once gets the same column pattern
      logic [31:0] cols;
      cols = $urandom;
      cfg_shift(cols, '1, ctrl_cur);
      #100 cfg_wr = 1'b1;
      #100 cfg_wr = 1'b0;
      rst_n = 1'b0;
      #100 rst_n = 1'b1;
      gate = 1'b1;
      test_n = 1'b0;
      #100 test_n = 1'b1;
      #1000;
      check(int'(energy) == 32 * $countones(cols), $sformatf("group write: energy %0d expected %0d",
            energy, 32 * $countones(cols)));
      if (int'(energy) == 32 * $countones(cols)) mech[M_GROUP_CFG]++;
      gate = 1'b0;
      #9000;
    end
    begin
      logic [N_PIX-1:0] m;
      for (int i = 0; i < N_PIX; i++) m[i] = ($urandom_range(3) == 0);
      write_enables(m);
      rst_n = 1'b0;
      #100 rst_n = 1'b1;
      gate = 1'b1;
      test_n = 1'b0;
      #100 test_n = 1'b1;
      #1000;
      check(int'(energy) == $countones(m), $sformatf("TEST: energy %0d expected %0d", energy, $countones(m)));
      if (int'(energy) == $countones(m)) mech[M_TEST]++;
      gate = 1'b0;

      // event counter saturation: 1030 injected events
      cnt_rst_n = 1'b0;
      #100 cnt_rst_n = 1'b1;
      gate = 1'b1;
      for (int k = 0; k < 1030; k++) begin
        test_n = 1'b0;
        #100 test_n = 1'b1;
        #900;
        if (k == 1021) check(events == 1022, "events counted before saturation");
      end
      check(events == 1023, $sformatf("event counter saturates (%0d)", events));
      if (events == 1023) mech[M_EV_SATURATE]++;
      gate = 1'b0;
      write_enables('1);
      // the saturated count is read out too
      ph_pix.push_back(7); ph_t.push_back(0);
      acquire("after saturation", 1'b0);
    end

    // every pixel alone: the timing signal must follow each photon with the same
    // delay and last exactly 400 ps
    begin
      int bad = 0;
      gate = 1'b1;
      rst_n = 1'b0;
      #100 rst_n = 1'b1;
      for (int p = 0; p < N_PIX; p++) begin
        time t0, tr, tf;
        photon[p] = 1'b1;
        t0 = $time;
        fork
          begin @(posedge tdc_last_trig) tr = $time; end
          begin #1 photon[p] = 1'b0; end
        join
        @(negedge tdc_last_trig) tf = $time;
        if (tr != t0 || tf - tr != 400) bad++;
        #300;
      end
      check(bad == 0, $sformatf("single-pixel timing: %0d pixels off", bad));
      check(int'(energy) == N_PIX, "all single-pixel photons counted");
      if (bad == 0) mech[M_SINGLE_PIXEL]++;
      gate = 1'b0;
    end

    for (int m = 0; m < M_NUM; m++) begin
      $display("mechanism %-26s seen %0d times", mech_name[m], mech[m]);
      check(mech[m] > 0, $sformatf("mechanism %s never exercised", mech_name[m]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
