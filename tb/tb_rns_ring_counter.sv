`timescale 1ns / 1ps
// tb_rns_ring_counter: counts known numbers of enabled clock edges (also
// past the 28,768 range), reads the three residues by sweeping the address
// fields in ascending order and taking the first one of each ring, decodes
// them by search and compares with (edges - 1) mod 28,768. Also checks that
// edges with ce low are not counted and that load restores the INIT state.
module tb_rns_ring_counter;
  import pvmap_pkg::*;
  import tb_util_pkg::*;

  logic        clk = 1'b0;
  logic        ce = 1'b0, load = 1'b0;
  logic [14:0] addr = COUNT_ADDR;
  logic [2:0]  q;
  int          checks = 0, failures = 0;
  int          total = 0;

  rns_ring_counter dut (.clk, .ce, .load, .addr, .q);

  initial begin
    #50ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic pulse(int n, bit en);
    ce = en;
    repeat (n) begin
      #5 clk = 1'b1;
      #5 clk = 1'b0;
    end
    ce = 1'b0;
  endtask

  task automatic read_and_check(int expected_edges);
    int r[3];
    bit f[3];
    int m;
    f = '{0, 0, 0};
    r = '{0, 0, 0};
    for (int a = 0; a < 32; a++) begin
      addr = {3{5'(a)}};
      #1;
      for (int i = 0; i < 3; i++)
        if (q[2-i] && !f[i]) begin f[i] = 1; r[i] = a; end
    end
    addr = COUNT_ADDR;
    #1;
    m = rns_decode(r[0], r[1], r[2]);
    checks++;
    if (m != ((expected_edges - 1 + RNS_RANGE) % RNS_RANGE)) begin
      failures++;
      $display("edges %0d: residues %0d %0d %0d decode %0d", expected_edges, r[0], r[1], r[2], m);
    end
  endtask

  initial begin
    #1;
    read_and_check(0);              // power-up state decodes to -1
    pulse(1, 1);   total += 1;    read_and_check(total);
    pulse(37, 0);                   read_and_check(total);  // ce low: no count
    pulse(818, 1); total += 818;  read_and_check(total);
    for (int i = 0; i < 6; i++) begin
      int n;
      n = 1 + ($urandom % 4000);
      pulse(n, 1); total += n;
      read_and_check(total);
    end
    pulse(RNS_RANGE, 1);            read_and_check(total); // full wrap
    // reload
    load = 1'b1; #5 clk = 1'b1; #5 clk = 1'b0; load = 1'b0;
    total = 0;                      read_and_check(0);
    pulse(1000, 1); total = 1000;   read_and_check(total);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
