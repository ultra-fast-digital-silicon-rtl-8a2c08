`timescale 1ps / 1ps
// tb_piso: a loaded 45-bit frame leaves MSB first, one bit per clock, in exactly
// 45 cycles, followed by zeros; a new load restarts the frame.
module tb_piso;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #500 clk = ~clk;

  logic        load = 1'b0;
  logic [44:0] din;
  logic        sdo;

  piso #(.W(45)) dut (.clk(clk), .load(load), .din(din), .sdo(sdo));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 20; t++) begin
      logic [44:0] frame, got;
      frame = {13'($urandom), 32'($urandom)};
      @(negedge clk);
      din = frame;
      load = 1'b1;
      @(negedge clk);
      load = 1'b0;
      din = '0;
      for (int i = 44; i >= 0; i--) begin
        got[i] = sdo;
        @(negedge clk);
      end
      checks++;
      if (got !== frame) begin
        failures++;
        $display("FAIL frame %h read %h", frame, got);
      end
      checks++;
      if (sdo !== 1'b0) begin
        failures++;
        $display("FAIL zeros after the frame");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
