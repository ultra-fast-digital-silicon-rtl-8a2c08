`timescale 1ps / 1ps
// tb_spad_quench: an enabled SPAD fires on a photon and stays insensitive for the
// dead time; a disabled one never fires; test_n low forces the node high.
module tb_spad_quench;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #500 clk = ~clk;

  logic photon = 1'b0, en = 1'b0, test_n = 1'b1;
  logic node;
  int   edges = 0;

  spad_quench #(.DEAD_TIME_PS(8000)) dut (.photon(photon), .en(en), .test_n(test_n), .node(node));

  always @(posedge node) edges++;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", msg);
    end
  endtask

  task automatic flash();
    photon = 1'b1;
    #50 photon = 1'b0;
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
    check(node === 1'b0, "idle low");
    flash();
    #100 check(node === 1'b0, "disabled pixel does not fire");
    en = 1'b1;
    #1000;
    flash();                        // t = 0 of the avalanche
    #10 check(node === 1'b1, "avalanche");
    #3000 flash();                  // lost in the dead time
    #4000 check(node === 1'b1, "still dead at 7 ns");
    #1100 check(node === 1'b0, "recovered after 8 ns");
    check(edges == 1, "photon in dead time lost");
    flash();
    #10 check(node === 1'b1 && edges == 2, "fires again after recovery");
    #9000;
    test_n = 1'b0;
    #10 check(node === 1'b1, "test injection");
    test_n = 1'b1;
    #10 check(node === 1'b0, "test released");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
