`timescale 1ns / 1ps
// tb_axi_interconnect: two AXI4-Lite masters issue random writes and reads
// at the same time through the interconnect to one memory (bram_ctrl). Each
// master owns half of the memory; every read must return what that master
// last wrote. The test also checks that a master never sees a ready or a
// response while the other one holds the path, and that simultaneous
// requests (contention) really occurred and were granted to both masters.
module tb_axi_interconnect;
  import pvmap_pkg::*;

  logic      clk = 1'b0, rst_n = 1'b0;
  axil_req_t m_req [2];
  axil_rsp_t m_rsp [2];
  axil_req_t s_req;
  axil_rsp_t s_rsp;
  int        checks = 0, failures = 0;
  int        contention = 0;
  int        done_cnt = 0;

  axi_interconnect dut (
    .clk, .rst_n, .m0_req(m_req[0]), .m0_rsp(m_rsp[0]), .m1_req(m_req[1]), .m1_rsp(m_rsp[1]),
    .s_req, .s_rsp);
  bram_ctrl #(.MEM_BYTES(256)) u_mem (.clk, .rst_n, .s_axi_req(s_req), .s_axi_rsp(s_rsp));

  always #5 clk = ~clk;

  initial begin
    #2ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if ((m_req[0].awvalid && m_req[1].awvalid) || (m_req[0].arvalid && m_req[1].arvalid))
      contention++;
    if ((m_rsp[0].awready && m_rsp[1].awready) || (m_rsp[0].bvalid && m_rsp[1].bvalid) ||
        (m_rsp[0].arready && m_rsp[1].arready) || (m_rsp[0].rvalid && m_rsp[1].rvalid)) begin
      failures++;
      $display("both masters see the same slave response");
    end
  end

  for (genvar g = 0; g < 2; g++) begin : g_master
    logic [31:0] model [32];
    initial begin
      m_req[g] = '0;
      for (int i = 0; i < 32; i++) model[i] = '0;
      wait (rst_n);
      // initialise own half
      for (int i = 0; i < 32; i++) begin
        @(negedge clk);
        m_req[g].awaddr = 32'(128 * g + 4 * i); m_req[g].wdata = '0; m_req[g].wstrb = 4'hf;
        m_req[g].awvalid = 1; m_req[g].wvalid = 1;
        do @(posedge clk); while (!m_rsp[g].awready);
        @(negedge clk); m_req[g].awvalid = 0; m_req[g].wvalid = 0; m_req[g].bready = 1;
        while (!m_rsp[g].bvalid) @(negedge clk);
        @(posedge clk); #1 m_req[g].bready = 0;
      end
      for (int n = 0; n < 200; n++) begin
        int w;
        w = $urandom % 32;
        @(negedge clk);
        if ($urandom % 2) begin
          logic [31:0] d;
          d = $urandom;
          m_req[g].awaddr = 32'(128 * g + 4 * w); m_req[g].wdata = d; m_req[g].wstrb = 4'hf;
          m_req[g].awvalid = 1; m_req[g].wvalid = 1;
          do @(posedge clk); while (!m_rsp[g].awready);
          @(negedge clk); m_req[g].awvalid = 0; m_req[g].wvalid = 0; m_req[g].bready = 1;
          while (!m_rsp[g].bvalid) @(negedge clk);
          checks++;
          if (m_rsp[g].bresp != 2'b00) failures++;
          @(posedge clk); #1 m_req[g].bready = 0;
          model[w] = d;
        end else begin
          m_req[g].araddr = 32'(128 * g + 4 * w); m_req[g].arvalid = 1;
          do @(posedge clk); while (!m_rsp[g].arready);
          @(negedge clk); m_req[g].arvalid = 0; m_req[g].rready = 1;
          while (!m_rsp[g].rvalid) @(negedge clk);
          checks++;
          if (m_rsp[g].rdata !== model[w]) begin
            failures++;
            $display("master %0d word %0d: %h expected %h", g, w, m_rsp[g].rdata, model[w]);
          end
          @(posedge clk); #1 m_req[g].rready = 0;
        end
        repeat ($urandom % 2) @(negedge clk);
      end
      done_cnt++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (done_cnt == 2);
    checks++;
    if (contention == 0) begin failures++; $display("no contention happened"); end
    $display("contention cycles: %0d", contention);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
