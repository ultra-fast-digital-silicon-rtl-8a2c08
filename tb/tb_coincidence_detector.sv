`timescale 1ps / 1ps
// tb_coincidence_detector: random and hand-picked activity patterns of the 16
// double rows against a reference search for 2 or 3 adjacent active rows.
module tb_coincidence_detector;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #500 clk = ~clk;

  logic [15:0] act;
  logic        three, trig;

  coincidence_detector #(.N_DROWS(16)) dut (.row_act(act), .three(three), .trig(trig));

  function automatic bit reference(logic [15:0] a, bit three_rows);
    int run = 0;
    for (int i = 0; i < 16; i++) begin
      run = a[i] ? run + 1 : 0;
      if (run >= (three_rows ? 3 : 2)) return 1'b1;
    end
    return 1'b0;
  endfunction

  task automatic apply(logic [15:0] a, bit t);
    act = a;
    three = t;
    #10;
    checks++;
    if (trig !== reference(a, t)) begin
      failures++;
      $display("FAIL act=%b three=%b trig=%b", a, t, trig);
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
    apply(16'b0, 0);
    apply(16'b0101_0101_0101_0101, 0);   // no neighbours
    apply(16'b1000_0000_0000_0001, 0);   // ends are not neighbours
    apply(16'b1100_0000_0000_0000, 0);
    apply(16'b1100_0000_0000_0000, 1);
    apply(16'b1110_0000_0000_0000, 1);
    apply(16'b0000_0000_0000_0111, 1);
    apply(16'b0110_1101_1011_0110, 1);   // pairs only
    for (int t = 0; t < 4000; t++) apply(16'($urandom) & 16'($urandom), t[0]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
