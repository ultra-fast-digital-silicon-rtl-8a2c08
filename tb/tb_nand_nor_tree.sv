`timescale 1ps / 1ps
// tb_nand_nor_tree: the 64-input local tree (6 levels, output low while any
// active-low input is low) and the 16-input peripheral tree with its inverting
// output (high while any input is low, the function of a 16-input NAND).
module tb_nand_nor_tree;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #500 clk = ~clk;

  logic [63:0] in64;
  logic        out64;
  logic [15:0] in16;
  logic        out16;

  nand_nor_tree #(.N_IN(64), .INVERT_OUT(1'b0)) dut_local  (.in_n(in64), .out(out64));
  nand_nor_tree #(.N_IN(16), .INVERT_OUT(1'b1)) dut_periph (.in_n(in16), .out(out16));

  task automatic apply(logic [63:0] a, logic [15:0] b);
    in64 = a;
    in16 = b;
    #10;
    checks += 2;
    // reference: a pulse is an input at 0
    if (out64 !== ((a == '1) ? 1'b1 : 1'b0)) begin
      failures++;
      $display("FAIL local in=%h out=%b", a, out64);
    end
    if (out16 !== ((b == '1) ? 1'b0 : 1'b1)) begin
      failures++;
      $display("FAIL periph in=%h out=%b", b, out16);
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
    apply('1, '1);
    apply('0, '0);
    for (int i = 0; i < 64; i++) apply(~(64'd1 << i), ~(16'd1 << (i % 16)));
    for (int t = 0; t < 2000; t++) begin
      logic [63:0] a;
      logic [15:0] b;
      // sparse pulses so that both outcomes are frequent
      a = '1;
      b = '1;
      repeat ($urandom_range(2)) a[$urandom_range(63)] = 1'b0;
      repeat ($urandom_range(2)) b[$urandom_range(15)] = 1'b0;
      apply(a, b);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
