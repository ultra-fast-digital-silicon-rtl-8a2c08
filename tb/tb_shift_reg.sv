`timescale 1ps / 1ps
// tb_shift_reg: after W clocks the register holds the last W serial bits, the
// first one in the MSB; sdo follows the MSB.
module tb_shift_reg;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #500 clk = ~clk;

  logic        sdi = 1'b0;
  logic [31:0] q;
  logic        sdo;

  shift_reg #(.W(32)) dut (.clk(clk), .sdi(sdi), .q(q), .sdo(sdo));

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 20; t++) begin
      logic [31:0] word;
      word = $urandom;
      for (int i = 31; i >= 0; i--) begin
        @(negedge clk) sdi = word[i];
      end
      @(negedge clk);
      checks += 2;
      if (q !== word) begin
        failures++;
        $display("FAIL q=%h expected %h", q, word);
      end
      if (sdo !== word[31]) begin
        failures++;
        $display("FAIL sdo");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
