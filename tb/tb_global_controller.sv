`timescale 1ns / 1ps
// tb_global_controller: the controller drives a model of three sensors and a
// model AXI4-Lite memory with random ready delays, for two passes with
// reinitialisation. The sensor model answers the address sweep with a
// random one-hot position per ring plus the delayed copies that sit above a
// shorter ring's tap, so only first-one capture gives the right residue.
// Checked: every record's value, address and byte lanes; the one-hot
// selects; settle, count and drain lengths in cycles; counter_init length;
// done after the last write.
module tb_global_controller;
  import pvmap_pkg::*;

  localparam int N = 3, REP = 2, SETTLE = 40, COUNT = 100, DRAIN = 16;

  logic         clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic         busy, done, error;
  logic [1:0]   sensor_id;
  logic [N-1:0] ro_select, counter_select;
  logic         counter_init;
  logic [14:0]  addr;
  logic [2:0]   residues;
  axil_req_t    req;
  axil_rsp_t    rsp;
  int           checks = 0, failures = 0;
  int           pos [REP][N][3];
  int           pass_no = 0;
  int           writes = 0;

  global_controller #(
    .N_SENSORS(N), .N_REPEAT(REP), .SETTLE_CYCLES(SETTLE), .COUNT_CYCLES(COUNT),
    .DRAIN_CYCLES(DRAIN), .REINIT(1'b1)
  ) dut (
    .clk, .rst_n, .start, .busy, .done, .error, .sensor_id, .ro_select,
    .counter_select, .counter_init, .addr, .residues, .m_axi_req(req), .m_axi_rsp(rsp));

  always #10 clk = ~clk;

  initial begin
    #2ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // sensor model: ring of length L holds a one at p; the bits above the tap
  // (p + L <= 31) hold delayed copies of it.
  function automatic logic ring_bit(int a, int p, int len);
    return (a == p) || (a == p + len);
  endfunction

  always_comb begin
    int s;
    s = int'(sensor_id);
    residues = '0;
    if (s < N) begin
      residues[2] = ring_bit(int'(addr[14:10]), pos[pass_no][s][0], 29);
      residues[1] = ring_bit(int'(addr[9:5]),   pos[pass_no][s][1], 31);
      residues[0] = ring_bit(int'(addr[4:0]),   pos[pass_no][s][2], 32);
    end
  end

  // AXI4-Lite memory model with random ready
  logic bpend;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rsp <= '0;
      bpend <= 1'b0;
    end else begin
      rsp.awready <= 1'b0;
      rsp.wready  <= 1'b0;
      if (req.awvalid && req.wvalid && !rsp.awready && !bpend && ($urandom % 3 == 0)) begin
        int idx, p, s;
        logic [15:0] hw;
        rsp.awready <= 1'b1;
        rsp.wready  <= 1'b1;
        bpend <= 1'b1;
        idx = writes;
        p = idx / N;
        s = idx % N;
        hw = req.awaddr[1] ? req.wdata[31:16] : req.wdata[15:0];
        checks++;
        if (req.awaddr != 32'(2 * idx) ||
            req.wstrb != (req.awaddr[1] ? 4'b1100 : 4'b0011) ||
            hw != {1'b0, 5'(pos[p][s][0]), 5'(pos[p][s][1]), 5'(pos[p][s][2])}) begin
          failures++;
          $display("write %0d: addr %h strb %b data %h", idx, req.awaddr, req.wstrb, hw);
        end
        writes++;
      end
      if (bpend && !rsp.bvalid && ($urandom % 2 == 0)) begin
        rsp.bvalid <= 1'b1;
        rsp.bresp  <= 2'b00;
      end
      if (rsp.bvalid && req.bready) begin
        rsp.bvalid <= 1'b0;
        bpend <= 1'b0;
      end
    end
  end

  // phase timing monitor
  int settle_cnt, count_cnt, drain_cnt, init_cnt, activations = 0;
  logic ro_any_d, cnt_any_d;
  always @(posedge clk) begin
    if (rst_n) begin
      if (!$onehot0(ro_select) || !$onehot0(counter_select)) begin
        failures++; $display("selects not one-hot");
      end
      if (ro_select != '0 && ro_select != (N'(1) << sensor_id)) begin
        failures++; $display("ro_select does not match sensor_id");
      end
      if (|ro_select && !(|counter_select) && !cnt_any_d && drain_cnt == 0) settle_cnt++;
      if (|counter_select) count_cnt++;
      if (counter_init) init_cnt++;
      if (|ro_select && !(|counter_select) && (cnt_any_d || drain_cnt > 0)) drain_cnt++;
      if (ro_any_d && !(|ro_select)) begin
        activations++;
        checks += 4;
        if (settle_cnt != SETTLE) begin failures++; $display("settle %0d", settle_cnt); end
        if (count_cnt != COUNT) begin failures++; $display("count %0d", count_cnt); end
        if (drain_cnt != DRAIN) begin failures++; $display("drain %0d", drain_cnt); end
        if (init_cnt != SETTLE / 2) begin failures++; $display("init %0d", init_cnt); end
        settle_cnt = 0; count_cnt = 0; drain_cnt = 0; init_cnt = 0;
      end
      ro_any_d  <= |ro_select;
      cnt_any_d <= |counter_select;
    end
  end

  // the sensor model's pass follows the controller's record index
  always @(posedge clk) if (writes > 0 && writes % N == 0 && writes / N < REP) pass_no <= writes / N;

  initial begin
    settle_cnt = 0; count_cnt = 0; drain_cnt = 0; init_cnt = 0;
    ro_any_d = 0; cnt_any_d = 0;
    for (int p = 0; p < REP; p++)
      for (int s = 0; s < N; s++) begin
        pos[p][s][0] = $urandom % 29;
        pos[p][s][1] = $urandom % 31;
        pos[p][s][2] = $urandom % 32;
      end
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    wait (done);
    repeat (2) @(posedge clk);
    checks += 3;
    if (writes != N * REP) begin failures++; $display("writes %0d", writes); end
    if (activations != N * REP) begin failures++; $display("activations %0d", activations); end
    if (error || busy) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
