`timescale 1ns / 1ps
// tb_ro_sensor: plays the controller for one RO sensor at 50 MHz: 512 cycles
// of settling, 2048 cycles (40.96 us) of counting, 16 cycles of draining,
// then an address sweep. The decoded count + 1 must lie between
// floor(Tm/P) and ceil(Tm/P) for the oscillator period P (the error bound
// of one edge, i.e. one 24.414 kHz step). Checks accumulation without
// reinitialisation and a fresh count after counter_init, for two RO types.
module tb_ro_sensor;
  import pvmap_pkg::*;
  import tb_util_pkg::*;

  logic        ctrl_clk = 1'b0;
  logic        ro_select = 1'b0, counter_select = 1'b0, counter_init = 1'b0;
  logic [14:0] addr = COUNT_ADDR;
  logic [2:0]  res_a, res_b;
  int          checks = 0, failures = 0;

  ro_sensor #(.RO_TYPE(RO_8_CC2_8_CC2)) dut_a (
    .ctrl_clk, .ro_select, .counter_select, .counter_init, .addr, .residues(res_a));
  ro_sensor #(.RO_TYPE(RO_LOW), .VARIATION_PPM(-15000)) dut_b (
    .ctrl_clk, .ro_select, .counter_select, .counter_init, .addr, .residues(res_b));

  always #10 ctrl_clk = ~ctrl_clk;

  initial begin
    #2ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic measure(bit init, output int ma, output int mb);
    int r[2][3];
    bit f[2][3];
    @(posedge ctrl_clk);
    ro_select <= 1'b1;
    counter_init <= init;
    repeat (256) @(posedge ctrl_clk);
    counter_init <= 1'b0;
    repeat (256) @(posedge ctrl_clk);
    counter_select <= 1'b1;
    repeat (2048) @(posedge ctrl_clk);
    counter_select <= 1'b0;
    repeat (16) @(posedge ctrl_clk);
    ro_select <= 1'b0;
    repeat (2) @(posedge ctrl_clk);
    f = '{default: 0};
    r = '{default: 0};
    for (int a = 0; a < 32; a++) begin
      addr = {3{5'(a)}};
      #1;
      for (int i = 0; i < 3; i++) begin
        if (res_a[2-i] && !f[0][i]) begin f[0][i] = 1; r[0][i] = a; end
        if (res_b[2-i] && !f[1][i]) begin f[1][i] = 1; r[1][i] = a; end
      end
    end
    addr = COUNT_ADDR;
    ma = rns_decode(r[0][0], r[0][1], r[0][2]);
    mb = rns_decode(r[1][0], r[1][1], r[1][2]);
  endtask

  task automatic check_range(string what, int m, int lo, int hi);
    checks++;
    if (m < lo || m > hi) begin
      failures++;
      $display("%s: decoded %0d outside [%0d, %0d]", what, m, lo, hi);
    end
  endtask

  // Tm = 40960 ns; P_a = 41.016 ns -> 998.6 edges; P_b = 17.65*0.985 ns -> 2356.0
  int ma, mb, ma1, mb1;
  initial begin
    #100;
    measure(1'b0, ma, mb);
    check_range("a first", ma + 1, 998, 999);
    check_range("b first", mb + 1, 2355, 2357);
    ma1 = ma; mb1 = mb;
    measure(1'b0, ma, mb);           // no reinit: counts accumulate
    check_range("a accumulated", ma - ma1, 998, 999);
    check_range("b accumulated", mb - mb1, 2355, 2357);
    measure(1'b1, ma, mb);           // reinit: fresh count
    check_range("a reinit", ma + 1, 998, 999);
    check_range("b reinit", mb + 1, 2355, 2357);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
