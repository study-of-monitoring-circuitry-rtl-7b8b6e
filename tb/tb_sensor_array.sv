`timescale 1ns / 1ps
// tb_sensor_array: five sensors (reference + four ro_16_8_cc2). The
// testbench measures sensors one at a time by raising their own ro_select and
// counter_select bits and reads all five through the residue multiplexer.
// A measured sensor must decode to floor/ceil(Tm/P) edges (P = 55.772 ns,
// Tm = 40.96 us: 734 or 735; reference 819 or 820), and a sensor not yet
// measured must still decode to its power-up value 28,767.
module tb_sensor_array;
  import pvmap_pkg::*;
  import tb_util_pkg::*;

  localparam int N = 5;

  logic          ctrl_clk = 1'b0, ref_clk = 1'b0;
  logic [N-1:0]  ro_select = '0, counter_select = '0;
  logic          counter_init = 1'b0;
  logic [14:0]   addr = COUNT_ADDR;
  logic [2:0]    sensor_id = '0;
  logic [2:0]    residues;
  int            checks = 0, failures = 0;
  bit            measured [N];

  sensor_array #(.N_SENSORS(N), .RO_TYPE(RO_16_8_CC2)) dut (
    .ctrl_clk, .ref_clk, .ro_select, .counter_select, .counter_init, .addr,
    .sensor_id, .residues);

  always #10 ctrl_clk = ~ctrl_clk;
  always #25 ref_clk  = ~ref_clk;

  initial begin
    #5ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end


  task automatic read(int s, output int m);
    int r[3];
    bit f[3];
    f = '{0, 0, 0};
    r = '{0, 0, 0};
    sensor_id = 3'(s);
    for (int a = 0; a < 32; a++) begin
      addr = {3{5'(a)}};
      #1;
      for (int i = 0; i < 3; i++)
        if (residues[2-i] && !f[i]) begin f[i] = 1; r[i] = a; end
    end
    addr = COUNT_ADDR;
    m = rns_decode(r[0], r[1], r[2]);
  endtask

  task automatic measure(int s);
    @(posedge ctrl_clk);
    ro_select[s] <= 1'b1;
    repeat (512) @(posedge ctrl_clk);
    counter_select[s] <= 1'b1;
    repeat (2048) @(posedge ctrl_clk);
    counter_select[s] <= 1'b0;
    repeat (16) @(posedge ctrl_clk);
    ro_select[s] <= 1'b0;
    repeat (2) @(posedge ctrl_clk);
    measured[s] = 1;
  endtask

  task automatic check_all();
    int m;
    for (int s = 0; s < N; s++) begin
      read(s, m);
      checks++;
      if (!measured[s]) begin
        if (m != RNS_RANGE - 1) begin failures++; $display("sensor %0d disturbed: %0d", s, m); end
      end else if (s == 0) begin
        if (m + 1 < 819 || m + 1 > 820) begin failures++; $display("reference: %0d", m); end
      end else begin
        if (m + 1 < 734 || m + 1 > 735) begin failures++; $display("sensor %0d: %0d", s, m); end
      end
    end
  endtask

  initial begin
    for (int s = 0; s < N; s++) measured[s] = 0;
    #100;
    check_all();
    measure(3); check_all();
    measure(0); check_all();
    measure(1); check_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
