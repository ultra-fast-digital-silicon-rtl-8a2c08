`timescale 1ps / 1ps
// tb_event_counter: counts rising edges of the timing signal, clears on reset,
// ignores the width of the pulses and saturates at 1023.
module tb_event_counter;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #500 clk = ~clk;

  logic       tree_out = 1'b0, rst_n = 1'b1;
  logic [9:0] count;
  logic       full;

  event_counter #(.W(10)) dut (.tree_out(tree_out), .rst_n(rst_n), .count(count), .full(full));

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (count=%0d)", msg, count);
    end
  endtask

  task automatic pulses(int n);
    for (int i = 0; i < n; i++) begin
      #($urandom_range(300, 100)) tree_out = 1'b1;
      #($urandom_range(2000, 400)) tree_out = 1'b0;
    end
    #10;
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #50 rst_n = 1'b0;
    #50 rst_n = 1'b1;
    #10 check(count == 0 && !full, "cleared");
    pulses(1);
    check(count == 1, "one event");
    pulses(99);
    check(count == 100, "100 events");
    rst_n = 1'b0;
    #10 check(count == 0, "reset");
    rst_n = 1'b1;
    pulses(1022);
    check(count == 1022 && !full, "1022 events");
    pulses(1);
    check(count == 1023 && full, "full at 1023");
    pulses(5);
    check(count == 1023 && full, "saturated");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
