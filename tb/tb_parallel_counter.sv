`timescale 1ps / 1ps
// tb_parallel_counter: checks the 64-input parallel counter (7-bit result) and
// the 8-input variant of the design's illustration (4-bit result) against a bit
// count computed by the testbench: all-zero, all-one, single bits, and random
// vectors of every density.
module tb_parallel_counter;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #500 clk = ~clk;

  logic [63:0] in64;
  logic [6:0]  cnt64;
  logic [7:0]  in8;
  logic [3:0]  cnt8;

  parallel_counter #(.N(64)) dut64 (.in(in64), .count(cnt64));
  parallel_counter #(.N(8))  dut8  (.in(in8),  .count(cnt8));

  function automatic int popcount64(logic [63:0] v);
    int n = 0;
    for (int i = 0; i < 64; i++) n += int'(v[i]);
    return n;
  endfunction

  task automatic check64(logic [63:0] v);
    in64 = v;
    #10;
    checks++;
    if (int'(cnt64) != popcount64(v)) begin
      failures++;
      $display("FAIL N=64 in=%h count=%0d expected=%0d", v, cnt64, popcount64(v));
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check64('0);
    check64('1);
    for (int i = 0; i < 64; i++) check64(64'd1 << i);
    for (int i = 0; i < 64; i++) check64(~(64'd1 << i));
    // random vectors with densities from 0 to 100 %
    for (int t = 0; t < 3000; t++) begin
      logic [63:0] v;
      int dens = t % 65;
      for (int i = 0; i < 64; i++) v[i] = ($urandom_range(63) < dens);
      check64(v);
    end
    // 8-input counter: exhaustive
    for (int v = 0; v < 256; v++) begin
      in8 = 8'(v);
      #10;
      checks++;
      if (int'(cnt8) != $countones(in8)) begin
        failures++;
        $display("FAIL N=8 in=%b count=%0d", in8, cnt8);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
