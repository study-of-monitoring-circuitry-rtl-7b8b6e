`timescale 1ns / 1ps
// tb_workload_ro_types: the PV-map measurement with each of the four RO
// types (ro_high, ro_low, ro_8_cc2_8_cc2, ro_16_8_cc2) at the default timing
// (10.24 us settling, 40.96 us counting at 50 MHz) on 100-sensor arrays, run
// side by side. Every record is read back through the host port and decoded.
// All oscillators are nominal, so each must count floor or ceil of
// 40.96 us / P edges: 2320-2321 (ro_high, ro_low), 998-999 (ro_8_cc2_8_cc2),
// 734-735 (ro_16_8_cc2); the reference 819-820 in every array.
module tb_workload_ro_types;
  import pvmap_pkg::*;
  import tb_util_pkg::*;

  localparam int N = 100;
  localparam int NT = 4;
  localparam ro_type_e TYPES [NT] = '{RO_HIGH, RO_LOW, RO_8_CC2_8_CC2, RO_16_8_CC2};
  localparam int LO [NT] = '{2320, 2320, 998, 734};
  localparam int HI [NT] = '{2321, 2321, 999, 735};

  logic      ctrl_clk = 1'b0, ref_clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [NT-1:0] busy, done, error;
  axil_req_t jreq [NT];
  axil_rsp_t jrsp [NT];
  int        checks = 0, failures = 0;

  for (genvar t = 0; t < NT; t++) begin : g_type
    pv_map_top #(.N_SENSORS(N), .RO_TYPE(TYPES[t])) dut (
      .ctrl_clk, .ref_clk, .rst_n, .start, .busy(busy[t]), .done(done[t]), .error(error[t]),
      .jtag_axi_req(jreq[t]), .jtag_axi_rsp(jrsp[t]));
  end

  always #10 ctrl_clk = ~ctrl_clk;
  always #25 ref_clk  = ~ref_clk;

  initial begin
    #8ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic host_read(int t, logic [31:0] a, output logic [31:0] d);
    @(negedge ctrl_clk);
    jreq[t].araddr = a; jreq[t].arvalid = 1;
    do @(posedge ctrl_clk); while (!jrsp[t].arready);
    @(negedge ctrl_clk); jreq[t].arvalid = 0; jreq[t].rready = 1;
    while (!jrsp[t].rvalid) @(negedge ctrl_clk);
    d = jrsp[t].rdata;
    @(posedge ctrl_clk); #1 jreq[t].rready = 0;
  endtask

  initial begin
    logic [31:0] d;
    for (int t = 0; t < NT; t++) jreq[t] = '0;
    repeat (3) @(posedge ctrl_clk);
    rst_n = 1;
    @(negedge ctrl_clk) start = 1;
    @(negedge ctrl_clk) start = 0;
    wait (&done);
    for (int t = 0; t < NT; t++) begin
      int lo_seen, hi_seen;
      lo_seen = 1 << 30;
      hi_seen = 0;
      for (int i = 0; i < N; i += 2) begin
        host_read(t, 32'(2 * i), d);
        for (int h = 0; h < 2; h++) begin
          logic [15:0] rec;
          int n;
          rec = h ? d[31:16] : d[15:0];
          n = rns_decode(int'(rec[14:10]), int'(rec[9:5]), int'(rec[4:0])) + 1;
          checks++;
          if (i + h == 0) begin
            if (n < 819 || n > 820) begin failures++; $display("type %0d reference: %0d", t, n); end
          end else begin
            if (n < LO[t] || n > HI[t]) begin failures++; $display("type %0d sensor %0d: %0d", t, i + h, n); end
            if (n < lo_seen) lo_seen = n;
            if (n > hi_seen) hi_seen = n;
          end
        end
      end
      $display("%s: %0d..%0d edges in 40.96 us = %0.6f..%0.6f MHz", TYPES[t].name(), lo_seen, hi_seen,
               lo_seen / 40.96, hi_seen / 40.96);
    end
    checks++;
    if (error != '0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
