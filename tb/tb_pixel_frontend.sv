`timescale 1ps / 1ps
// tb_pixel_frontend: enable memory write/hold, detection only with EN and GATE,
// SR latch set by a detection, held after it, cleared by RESET, and RESET
// winning over a simultaneous detection.
module tb_pixel_frontend;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #500 clk = ~clk;

  logic node = 1'b0, gate = 1'b0, rst_n = 1'b0, wr = 1'b0, wdata = 1'b0;
  logic en, det_n, hit;

  pixel_frontend dut (.node(node), .gate(gate), .rst_n(rst_n), .wr(wr), .wdata(wdata),
                      .en(en), .det_n(det_n), .hit(hit));

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", msg);
    end
  endtask

  task automatic write_en(logic v);
    wdata = v;
    #10 wr = 1'b1;
    #10 wr = 1'b0;
    #10 wdata = ~v;    // data changing with wr low must not be stored
    #10;
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    write_en(1'b0);
    check(en === 1'b0, "enable written 0 and held");
    #10 rst_n = 1'b1;
    #10 check(hit === 1'b0, "reset clears latch");
    gate = 1'b1;
    node = 1'b1;
    #10 check(det_n === 1'b1 && hit === 1'b0, "disabled pixel ignores avalanche");
    node = 1'b0;
    write_en(1'b1);
    check(en === 1'b1, "enable written 1 and held");
    gate = 1'b0;
    node = 1'b1;
    #10 check(det_n === 1'b1 && hit === 1'b0, "outside GATE ignored");
    node = 1'b0;
    gate = 1'b1;
    #10 check(hit === 1'b0, "no hit before avalanche");
    node = 1'b1;
    #10 check(det_n === 1'b0 && hit === 1'b1, "detection sets latch");
    node = 1'b0;
    #10 check(det_n === 1'b1 && hit === 1'b1, "latch holds after avalanche");
    rst_n = 1'b0;
    #10 check(hit === 1'b0, "RESET clears latch");
    node = 1'b1;
    #10 check(hit === 1'b0, "RESET dominates a detection");
    rst_n = 1'b1;
    #10 check(hit === 1'b1, "set after RESET released");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
