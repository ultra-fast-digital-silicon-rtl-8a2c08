`timescale 1ps / 1ps
// tb_adder_tree: sums of sixteen 7-bit counter words (each 0..64) against an
// integer sum; includes the full-scale case 16 x 64 = 1024.
module tb_adder_tree;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #500 clk = ~clk;

  logic [15:0][6:0] in;
  logic [10:0]      sum;

  adder_tree #(.N_IN(16), .IN_W(7), .OUT_W(11)) dut (.in(in), .sum(sum));

  task automatic check();
    int ref_sum = 0;
    for (int i = 0; i < 16; i++) ref_sum += int'(in[i]);
    #10;
    checks++;
    if (int'(sum) != ref_sum) begin
      failures++;
      $display("FAIL sum=%0d expected=%0d", sum, ref_sum);
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
    for (int i = 0; i < 16; i++) in[i] = 7'd64;
    check();
    in = '0;
    check();
    for (int j = 0; j < 16; j++) begin
      in = '0;
      in[j] = 7'd64;
      check();
    end
    for (int t = 0; t < 2000; t++) begin
      for (int i = 0; i < 16; i++) in[i] = 7'($urandom_range(64));
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
