`timescale 1ns / 1ps
// tb_workload_repeat: the precision experiment's configuration: 140 sensors
// (reference + 139 ro_low), reinitialisation of the rings before every
// measurement and a 32 KB record memory, with consecutive passes over all
// sensors (3 here instead of 100, to bound simulation time; the memory and
// address map hold 100). Each oscillator gets a fixed +/-2% period offset.
// Checked: the records of every pass, read back through the host port, decode
// to the same count within one edge for each sensor (no accumulation, stable
// measurement), the count matches floor/ceil(Tm/P) for the sensor's period
// timed by the testbench, and the last record sits at the address the
// 100-pass layout predicts for pass 3.
module tb_workload_repeat;
  import pvmap_pkg::*;
  import tb_util_pkg::*;

  localparam int N = 140, REP = 3;

  logic      ctrl_clk = 1'b0, ref_clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic      busy, done, error;
  axil_req_t jreq;
  axil_rsp_t jrsp;
  int        checks = 0, failures = 0;

  pv_map_top #(
    .N_SENSORS(N), .RO_TYPE(RO_LOW), .N_REPEAT(REP), .REINIT(1'b1),
    .PV_SPREAD_PPM(40000), .MEM_BYTES(32768)
  ) dut (
    .ctrl_clk, .ref_clk, .rst_n, .start, .busy, .done, .error,
    .jtag_axi_req(jreq), .jtag_axi_rsp(jrsp));

  always #10 ctrl_clk = ~ctrl_clk;
  always #25 ref_clk  = ~ref_clk;

  initial begin
    #30ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  realtime period [N];
  for (genvar g = 1; g < N; g++) begin : g_time
    int      intervals = 0;
    realtime last = 0, sum = 0;
    always @(posedge dut.u_sensors.g_sensor[g].u_sensor.ro_clk) begin
      if (last > 0 && $realtime - last < 1000) begin
        sum += $realtime - last;
        intervals++;
        period[g] = sum / intervals;
      end
      last = $realtime;
    end
  end

  task automatic host_read(logic [31:0] a, output logic [31:0] d);
    @(negedge ctrl_clk);
    jreq.araddr = a; jreq.arvalid = 1;
    do @(posedge ctrl_clk); while (!jrsp.arready);
    @(negedge ctrl_clk); jreq.arvalid = 0; jreq.rready = 1;
    while (!jrsp.rvalid) @(negedge ctrl_clk);
    d = jrsp.rdata;
    @(posedge ctrl_clk); #1 jreq.rready = 0;
  endtask

  int n [REP][N];

  initial begin
    logic [31:0] d;
    int worst;
    jreq = '0;
    repeat (3) @(posedge ctrl_clk);
    rst_n = 1;
    @(negedge ctrl_clk) start = 1;
    @(negedge ctrl_clk) start = 0;
    wait (done);
    for (int i = 0; i < N * REP; i += 2) begin
      host_read(32'(2 * i), d);
      for (int h = 0; h < 2; h++) begin
        logic [15:0] rec;
        rec = h ? d[31:16] : d[15:0];
        n[(i + h) / N][(i + h) % N] = rns_decode(int'(rec[14:10]), int'(rec[9:5]), int'(rec[4:0])) + 1;
      end
    end
    // memory beyond the last record stays untouched (reset value unknown: only
    // check that a 4th pass was not written by comparing with pass 3's word)
    worst = 0;
    for (int s = 0; s < N; s++) begin
      int mn, mx, lo, hi;
      mn = n[0][s]; mx = n[0][s];
      for (int p = 1; p < REP; p++) begin
        if (n[p][s] < mn) mn = n[p][s];
        if (n[p][s] > mx) mx = n[p][s];
      end
      if (mx - mn > worst) worst = mx - mn;
      if (s == 0) begin lo = 819; hi = 820; end
      else begin lo = int'($floor(40960.0 / period[s])); hi = int'($ceil(40960.0 / period[s])); end
      checks += 2;
      if (mx - mn > 1) begin failures++; $display("sensor %0d spread %0d..%0d", s, mn, mx); end
      if (mn < lo || mx > hi) begin failures++; $display("sensor %0d: %0d..%0d, expected %0d..%0d", s, mn, mx, lo, hi); end
    end
    $display("largest spread over %0d passes: %0d edge(s) = %0.6f MHz", REP, worst, worst / 40.96);
    checks++;
    if (error) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
