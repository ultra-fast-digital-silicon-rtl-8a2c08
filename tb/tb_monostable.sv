`timescale 1ps / 1ps
// tb_monostable: the pulse starts at the falling edge of trig_n, lasts 400 ps,
// and a second edge during the pulse does not stretch it.
module tb_monostable;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #500 clk = ~clk;

  logic trig_n = 1'b1;
  logic pulse_n;
  time  t_fall, t_rise;

  monostable #(.T_MONO_PS(400)) dut (.trig_n(trig_n), .pulse_n(pulse_n));

  always @(negedge pulse_n) t_fall = $time;
  always @(posedge pulse_n) t_rise = $time;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", msg);
    end
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    check(pulse_n === 1'b1, "idle high");
    for (int n = 0; n < 5; n++) begin
      time t0;
      trig_n = 1'b0;
      t0 = $time;
      #1;
      check(pulse_n === 1'b0, "pulse starts at the edge");
      #150 trig_n = 1'b1;
      #100 trig_n = 1'b0;      // second edge inside the pulse
      #1000;
      check(t_fall == t0, "pulse start time");
      check(t_rise - t_fall == 400, $sformatf("pulse width %0t", t_rise - t_fall));
      trig_n = 1'b1;
      #3000;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
