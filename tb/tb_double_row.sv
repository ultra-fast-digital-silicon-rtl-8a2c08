`timescale 1ps / 1ps
// tb_double_row: one double row of 64 pixels. Writes random enable patterns,
// fires random photon sets inside the GATE window and checks the hit map, the
// 7-bit count and the local tree output (low from the first detection until
// 400 ps after the last); also photons outside GATE, photons in the dead time,
// and TEST injection.
module tb_double_row;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #500 clk = ~clk;

  logic [63:0] photon = '0;
  logic [1:0]  row_wr = '0;
  logic [31:0] col_data = '0;
  logic        gate = 1'b0, test_n = 1'b1, rst_n = 1'b0;
  logic        local_n;
  logic [6:0]  count;
  logic [63:0] hits;
  time         t_low, t_high;

  double_row #(.COLS(32), .T_MONO_PS(400), .DEAD_TIME_PS(8000)) dut (
    .photon(photon), .row_wr(row_wr), .col_data(col_data), .gate(gate), .test_n(test_n),
    .rst_n(rst_n), .local_n(local_n), .count(count), .hits(hits));

  always @(negedge local_n) t_low = $time;
  always @(posedge local_n) t_high = $time;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", msg);
    end
  endtask

  task automatic write_enables(logic [63:0] en);
    for (int r = 0; r < 2; r++) begin
      col_data = en[32*r +: 32];
      #10 row_wr[r] = 1'b1;
      #10 row_wr[r] = 1'b0;
      #10;
    end
  endtask

  task automatic clear();
    rst_n = 1'b0;
    #20 rst_n = 1'b1;
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
    logic [63:0] en, fire, want;
    #100;
    for (int t = 0; t < 30; t++) begin
      time t_first, t_last;
      en = (t == 0) ? '1 : {$urandom, $urandom} | {$urandom, $urandom};
      fire = (t == 0) ? '1 : {$urandom, $urandom} & {$urandom, $urandom};
      write_enables(en);
      clear();
      gate = 1'b1;
      #100;
      t_first = 0;
      t_last = 0;
      // photons arrive one by one, 30 ps apart
      for (int p = 0; p < 64; p++) begin
        if (fire[p]) begin
          photon[p] = 1'b1;
          if (en[p]) begin
            if (t_first == 0) t_first = $time;
            t_last = $time;
          end
          #30;
        end
      end
      #50;
      photon = '0;
      #2000;
      gate = 1'b0;
      want = en & fire;
      check(hits == want, $sformatf("hit map %h expected %h", hits, want));
      check(int'(count) == $countones(want), $sformatf("count %0d expected %0d", count, $countones(want)));
      if (want != 0) begin
        check(t_low == t_first, "local tree falls with the first detection");
        check(t_high == t_last + 400, $sformatf("local tree rises 400 ps after the last (%0t vs %0t)", t_high, t_last));
      end
      check(local_n === 1'b1, "local tree idle");
      #9000;   // let the SPADs recover
    end

    // photons outside GATE are not counted
    write_enables('1);
    clear();
    photon[5] = 1'b1;
    #50 photon = '0;
    #100 check(count == 0 && local_n, "photon outside GATE ignored");
    #9000;
    // a second photon on a dead pixel is lost
    gate = 1'b1;
    photon[7] = 1'b1;
    #50 photon = '0;
    #2000 photon[7] = 1'b1;
    #50 photon = '0;
    #100 check(count == 1, "second photon in dead time not counted twice");
    #9000;
    gate = 1'b0;
    // TEST injection fires every enabled pixel
    en = {32'hFFFF_0000, 32'h0000_FFFF};
    write_enables(en);
    clear();
    gate = 1'b1;
    test_n = 1'b0;
    #100 test_n = 1'b1;
    #1000;
    check(count == 32 && hits == en, "TEST fires all enabled pixels");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
