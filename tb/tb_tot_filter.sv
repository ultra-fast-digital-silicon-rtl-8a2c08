`timescale 1ps / 1ps
// tb_tot_filter: for every threshold code (600 ps + 100 ps * code) the filter
// must stay quiet for pulses shorter than the threshold, including a lone 400 ps
// monostable pulse and two well separated ones, and must trigger for longer pulses,
// rising exactly one threshold after the pulse and falling with it.
module tb_tot_filter;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #500 clk = ~clk;

  logic       tree_out = 1'b0;
  logic [2:0] code = '0;
  logic       trig;
  time        t_trig_rise, t_trig_fall;
  int         n_trig;

  tot_filter dut (.tree_out(tree_out), .code(code), .trig(trig));

  always @(posedge trig) begin
    t_trig_rise = $time;
    n_trig++;
  end
  always @(negedge trig) t_trig_fall = $time;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", msg);
    end
  endtask

  // one pulse of width w; returns after the line has settled
  task automatic pulse(int w, output time t_rise, output time t_fall);
    tree_out = 1'b1;
    t_rise = $time;
    #(w);
    tree_out = 1'b0;
    t_fall = $time;
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
    #2000;
    for (int c = 0; c < 8; c++) begin
      int thr;
      time tr, tf;
      int widths[4];
      code = 3'(c);
      thr = 600 + 100 * c;
      #3000;
      widths = '{400, thr - 50, thr + 50, thr + 700};
      foreach (widths[i]) begin
        n_trig = 0;
        pulse(widths[i], tr, tf);
        if (widths[i] > thr) begin
          check(n_trig == 1, $sformatf("code %0d width %0d triggers", c, widths[i]));
          check(t_trig_rise - tr == time'(thr), $sformatf("code %0d trigger delay %0t", c, t_trig_rise - tr));
          check(t_trig_fall == tf, $sformatf("code %0d trigger ends with the pulse", c));
        end else begin
          check(n_trig == 0, $sformatf("code %0d width %0d rejected", c, widths[i]));
        end
      end
      // two isolated photons: two 400 ps pulses, the second starting after the
      // delayed copy of the first has ended
      n_trig = 0;
      tree_out = 1'b1;
      #400 tree_out = 1'b0;
      #(thr + 100) tree_out = 1'b1;
      #400 tree_out = 1'b0;
      #3000;
      check(n_trig == 0, $sformatf("code %0d separated pulses rejected", c));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
