`timescale 1ns / 1ps
// tb_pv_map_top: end-to-end run of the PV-mapping monitor at reduced size:
// 8 sensors (reference + 7 ro_low oscillators with a +/-2% period spread),
// two measurement passes with counter reinitialisation, 64 settling and 512
// counting cycles (Tm = 10.24 us) at 50 MHz, reference clock 20 MHz.
//
// While the controller runs, a host model on the JTAG-side AXI port keeps
// writing a scratch word and reading record 0, so that the interconnect has
// to arbitrate. After done, the host reads every record back, decodes it by
// search, and checks it against an expectation formed in the testbench:
// each oscillator's period is timed from its output, and the counted edges
// must lie between floor(Tm/P) and ceil(Tm/P); the reference must count 204
// or 205 edges. The second pass must give a fresh count (reinitialisation),
// not a sum. Each mechanism is counted and must occur at least once.
module tb_pv_map_top;
  import pvmap_pkg::*;
  import tb_util_pkg::*;

  localparam int N = 8, REP = 2, SETTLE = 64, COUNT = 512, MEMB = 64;
  localparam realtime TM = COUNT * 20.0;

  logic      ctrl_clk = 1'b0, ref_clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic      busy, done, error;
  axil_req_t jreq;
  axil_rsp_t jrsp;
  int        checks = 0, failures = 0;

  pv_map_top #(
    .N_SENSORS(N), .RO_TYPE(RO_LOW), .N_REPEAT(REP), .REINIT(1'b1),
    .SETTLE_CYCLES(SETTLE), .COUNT_CYCLES(COUNT), .PV_SPREAD_PPM(40000), .MEM_BYTES(MEMB)
  ) dut (
    .ctrl_clk, .ref_clk, .rst_n, .start, .busy, .done, .error,
    .jtag_axi_req(jreq), .jtag_axi_rsp(jrsp));

  always #10 ctrl_clk = ~ctrl_clk;
  always #25 ref_clk  = ~ref_clk;

  initial begin
    #5ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- oscillator period of every RO sensor, timed from its output
  realtime period [N];
  for (genvar g = 1; g < N; g++) begin : g_time
    int      intervals = 0;
    realtime last = 0, sum = 0;
    always @(posedge dut.u_sensors.g_sensor[g].u_sensor.ro_clk) begin
      // average of the intervals between consecutive edges of one activation
      if (last > 0 && $realtime - last < 1000) begin
        sum += $realtime - last;
        intervals++;
        period[g] = sum / intervals;
      end
      last = $realtime;
    end
  end

  // ---- mechanism counters
  int n_ref = 0, n_ro = 0, n_reinit = 0, n_contention = 0, n_jtag = 0, n_records = 0;
  always @(posedge ctrl_clk) begin
    if (dut.u_xbar.m0_req.awvalid && jreq.awvalid) n_contention++;
    if (dut.u_xbar.m0_req.awvalid && dut.u_xbar.m0_rsp.awready) n_records++;
    if (dut.u_ctrl.counter_init && dut.u_ctrl.ro_select[0] && !dut.u_ctrl.counter_select[0]) n_reinit++;
  end

  // ---- host (JTAG-to-AXI) model
  task automatic host_write(logic [31:0] a, logic [31:0] d);
    @(negedge ctrl_clk);
    jreq.awaddr = a; jreq.wdata = d; jreq.wstrb = 4'hf; jreq.awvalid = 1; jreq.wvalid = 1;
    do @(posedge ctrl_clk); while (!jrsp.awready);
    @(negedge ctrl_clk); jreq.awvalid = 0; jreq.wvalid = 0; jreq.bready = 1;
    while (!jrsp.bvalid) @(negedge ctrl_clk);
    @(posedge ctrl_clk); #1 jreq.bready = 0;
    n_jtag++;
  endtask

  task automatic host_read(logic [31:0] a, output logic [31:0] d);
    @(negedge ctrl_clk);
    jreq.araddr = a; jreq.arvalid = 1;
    do @(posedge ctrl_clk); while (!jrsp.arready);
    @(negedge ctrl_clk); jreq.arvalid = 0; jreq.rready = 1;
    while (!jrsp.rvalid) @(negedge ctrl_clk);
    d = jrsp.rdata;
    @(posedge ctrl_clk); #1 jreq.rready = 0;
    n_jtag++;
  endtask

  function automatic int decode_rec(logic [15:0] rec);
    return rns_decode(int'(rec[14:10]), int'(rec[9:5]), int'(rec[4:0]));
  endfunction

  int m [REP][N];

  initial begin
    logic [31:0] d;
    jreq = '0;
    repeat (3) @(posedge ctrl_clk);
    rst_n = 1;
    @(negedge ctrl_clk) start = 1;
    @(negedge ctrl_clk) start = 0;
    // host traffic during the run
    while (!done) begin
      host_write(32'(MEMB - 4), 32'h5a5a_0000 | 32'(n_jtag));
      host_read(32'h0, d);
      repeat ($urandom % 40) @(negedge ctrl_clk);
    end
    // read back all records
    for (int i = 0; i < N * REP; i++) begin
      host_read(32'(2 * i) & ~32'h3, d);
      m[i / N][i % N] = decode_rec((i % 2) ? d[31:16] : d[15:0]);
    end
    for (int p = 0; p < REP; p++) begin
      for (int s = 0; s < N; s++) begin
        int lo, hi;
        if (s == 0) begin
          lo = 204; hi = 205;
          n_ref++;
        end else begin
          lo = int'($floor(TM / period[s]));
          hi = int'($ceil(TM / period[s]));
          n_ro++;
        end
        checks++;
        if (m[p][s] + 1 < lo || m[p][s] + 1 > hi) begin
          failures++;
          $display("pass %0d sensor %0d: %0d edges, expected %0d..%0d", p, s, m[p][s] + 1, lo, hi);
        end else begin
          $display("pass %0d sensor %0d: %0d edges = %0.4f MHz", p, s, m[p][s] + 1,
                   (m[p][s] + 1) / TM * 1.0e3);
        end
      end
    end
    host_read(32'(MEMB - 4), d);
    checks++;
    if (d[31:16] != 16'h5a5a) begin failures++; $display("scratch word lost: %h", d); end
    checks++;
    if (error) begin failures++; $display("controller error flag"); end
    checks++;
    if (n_records != N * REP) begin failures++; $display("records written: %0d", n_records); end
    $display("mechanisms: reference=%0d ro=%0d reinit_cycles=%0d contention=%0d host_tx=%0d",
             n_ref, n_ro, n_reinit, n_contention, n_jtag);
    checks += 5;
    if (n_ref == 0)        begin failures++; $display("reference sensor never measured"); end
    if (n_ro == 0)         begin failures++; $display("no RO sensor measured"); end
    if (n_reinit == 0)     begin failures++; $display("reinitialisation never happened"); end
    if (n_contention == 0) begin failures++; $display("no interconnect contention"); end
    if (n_jtag == 0)       begin failures++; $display("no host access"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
