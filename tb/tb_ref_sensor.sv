`timescale 1ns / 1ps
// tb_ref_sensor: the reference sensor counts a 20 MHz clock produced in
// phase with the 50 MHz controller clock while counter_select is high for
// 2048 controller cycles (40.96 us = 819.2 reference periods). The decoded
// count must be 819 or 820 edges (M = 818 or 819, i.e. 19.97 or 19.995 MHz).
// The measurement is repeated with and without counter_init.
module tb_ref_sensor;
  import pvmap_pkg::*;
  import tb_util_pkg::*;

  logic        ctrl_clk = 1'b0, ref_clk = 1'b0;
  logic        counter_select = 1'b0, counter_init = 1'b0;
  logic [14:0] addr = COUNT_ADDR;
  logic [2:0]  residues;
  int          checks = 0, failures = 0;

  ref_sensor dut (.ref_clk, .counter_select, .counter_init, .addr, .residues);

  always #10 ctrl_clk = ~ctrl_clk;
  always #25 ref_clk  = ~ref_clk;

  initial begin
    #2ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic measure(bit init, output int m);
    int r[3];
    bit f[3];
    if (init) begin
      @(posedge ctrl_clk) counter_init <= 1'b1;
      repeat (10) @(posedge ctrl_clk);
      counter_init <= 1'b0;
    end
    repeat (20) @(posedge ctrl_clk);
    counter_select <= 1'b1;
    repeat (2048) @(posedge ctrl_clk);
    counter_select <= 1'b0;
    repeat (4) @(posedge ctrl_clk);
    f = '{0, 0, 0};
    r = '{0, 0, 0};
    for (int a = 0; a < 32; a++) begin
      addr = {3{5'(a)}};
      #1;
      for (int i = 0; i < 3; i++)
        if (residues[2-i] && !f[i]) begin f[i] = 1; r[i] = a; end
    end
    addr = COUNT_ADDR;
    m = rns_decode(r[0], r[1], r[2]);
  endtask

  int m0, m;
  initial begin
    measure(1'b0, m);
    checks++;
    if (m < 818 || m > 819) begin failures++; $display("first: %0d", m); end
    m0 = m;
    measure(1'b0, m);
    checks++;
    if (m - m0 < 819 || m - m0 > 820) begin failures++; $display("accumulated: %0d", m); end
    measure(1'b1, m);
    checks++;
    if (m < 818 || m > 819) begin failures++; $display("after init: %0d", m); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
