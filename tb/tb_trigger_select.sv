`timescale 1ps / 1ps
// tb_trigger_select: the first-photon trigger in each of the three modes: direct
// (follows the timing signal), time-over-threshold (short pulse rejected, long
// one delayed by the threshold) and coincidence (two and three adjacent double
// rows).
module tb_trigger_select;
  import dsipm_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #500 clk = ~clk;

  logic        tree_out = 1'b0;
  logic [15:0] local_n = '1;
  ctrl_t       ctrl;
  logic        trig;
  int          n_trig;
  time         t_trig;

  trigger_select #(.N_DR(16)) dut (.tree_out(tree_out), .local_n(local_n), .ctrl(ctrl), .trig(trig));

  always @(posedge trig) begin
    n_trig++;
    t_trig = $time;
  end

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", msg);
    end
  endtask

  // activity in the double rows of mask for w ps (tree_out follows, as in the array)
  task automatic activity(logic [15:0] mask, int w);
    n_trig = 0;
    local_n = ~mask;
    tree_out = |mask;
    #(w);
    local_n = '1;
    tree_out = 1'b0;
    #3000;
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    time t0;
    ctrl = '{mode: TRIG_DIRECT, tot_code: 3'd0, coinc3: 1'b0};
    #3000;
    activity(16'h0001, 400);
    check(n_trig == 1, "direct: single photon triggers");
    t0 = $time;
    tree_out = 1'b1;
    #1 check(trig === 1'b1, "direct: no delay");
    tree_out = 1'b0;
    #3000;

    ctrl = '{mode: TRIG_TOT, tot_code: 3'd2, coinc3: 1'b0};   // 800 ps
    #3000;
    activity(16'h0001, 400);
    check(n_trig == 0, "tot: single photon rejected");
    activity(16'h0001, 750);
    check(n_trig == 0, "tot: 750 ps rejected at 800 ps");
    t0 = $time;
    activity(16'h0001, 1200);
    check(n_trig == 1 && t_trig - t0 == 800, "tot: 1200 ps accepted after 800 ps");

    ctrl = '{mode: TRIG_COINC, tot_code: 3'd0, coinc3: 1'b0};
    #3000;
    activity(16'h0005, 400);
    check(n_trig == 0, "coinc2: non-adjacent rejected");
    activity(16'h0180, 400);
    check(n_trig == 1, "coinc2: adjacent pair accepted");
    ctrl.coinc3 = 1'b1;
    #3000;
    activity(16'h0180, 400);
    check(n_trig == 0, "coinc3: pair rejected");
    activity(16'h7000, 400);
    check(n_trig == 1, "coinc3: triple accepted");

    ctrl = '{mode: 2'd3, tot_code: 3'd0, coinc3: 1'b0};
    #3000;
    activity(16'h0001, 400);
    check(n_trig == 1, "mode 3 behaves as direct");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
