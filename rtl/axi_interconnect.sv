`timescale 1ns / 1ps
// axi_interconnect: two AXI4-Lite masters sharing one AXI4-Lite slave.
//
// Master 0 is the global controller (writes the measurement records), master
// 1 the JTAG-to-AXI bridge through which a host reads them out. The write
// path (AW, W, B) and the read path (AR, R) are arbitrated independently.
// When a path is free and a master raises awvalid (or arvalid) it is granted
// that path; if both ask in the same cycle, the master that was not granted
// last time wins (round robin). The grant is held until the response
// handshake (B or R) completes, so transactions are never interleaved.
// A master that is not granted sees its ready signals low and waits. The
// granted master's request passes through combinationally; the grant itself
// is registered, so a new transaction starts one cycle after the request.
//
// The design only names this block; everything here is this
// implementation's choice.
module axi_interconnect
  import pvmap_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  axil_req_t m0_req,
  output axil_rsp_t m0_rsp,
  input  axil_req_t m1_req,
  output axil_rsp_t m1_rsp,
  output axil_req_t s_req,
  input  axil_rsp_t s_rsp
);

  logic wr_busy, wr_owner, wr_last;
  logic rd_busy, rd_owner, rd_last;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_busy  <= 1'b0;
      wr_owner <= 1'b0;
      wr_last  <= 1'b1;
      rd_busy  <= 1'b0;
      rd_owner <= 1'b0;
      rd_last  <= 1'b1;
    end else begin
      // write path
      if (!wr_busy) begin
        if (m0_req.awvalid && (!m1_req.awvalid || wr_last)) begin
          wr_busy <= 1'b1; wr_owner <= 1'b0; wr_last <= 1'b0;
        end else if (m1_req.awvalid) begin
          wr_busy <= 1'b1; wr_owner <= 1'b1; wr_last <= 1'b1;
        end
      end else if (s_rsp.bvalid && s_req.bready) begin
        wr_busy <= 1'b0;
      end
      // read path
      if (!rd_busy) begin
        if (m0_req.arvalid && (!m1_req.arvalid || rd_last)) begin
          rd_busy <= 1'b1; rd_owner <= 1'b0; rd_last <= 1'b0;
        end else if (m1_req.arvalid) begin
          rd_busy <= 1'b1; rd_owner <= 1'b1; rd_last <= 1'b1;
        end
      end else if (s_rsp.rvalid && s_req.rready) begin
        rd_busy <= 1'b0;
      end
    end
  end

  axil_req_t wr_src, rd_src;
  assign wr_src = wr_owner ? m1_req : m0_req;
  assign rd_src = rd_owner ? m1_req : m0_req;

  always_comb begin
    s_req = '0;
    if (wr_busy) begin
      s_req.awaddr  = wr_src.awaddr;
      s_req.awvalid = wr_src.awvalid;
      s_req.wdata   = wr_src.wdata;
      s_req.wstrb   = wr_src.wstrb;
      s_req.wvalid  = wr_src.wvalid;
      s_req.bready  = wr_src.bready;
    end
    if (rd_busy) begin
      s_req.araddr  = rd_src.araddr;
      s_req.arvalid = rd_src.arvalid;
      s_req.rready  = rd_src.rready;
    end
  end

  always_comb begin
    m0_rsp = '0;
    m1_rsp = '0;
    if (wr_busy && !wr_owner) begin
      m0_rsp.awready = s_rsp.awready; m0_rsp.wready = s_rsp.wready;
      m0_rsp.bvalid  = s_rsp.bvalid;  m0_rsp.bresp  = s_rsp.bresp;
    end
    if (wr_busy && wr_owner) begin
      m1_rsp.awready = s_rsp.awready; m1_rsp.wready = s_rsp.wready;
      m1_rsp.bvalid  = s_rsp.bvalid;  m1_rsp.bresp  = s_rsp.bresp;
    end
    if (rd_busy && !rd_owner) begin
      m0_rsp.arready = s_rsp.arready; m0_rsp.rvalid = s_rsp.rvalid;
      m0_rsp.rdata   = s_rsp.rdata;   m0_rsp.rresp  = s_rsp.rresp;
    end
    if (rd_busy && rd_owner) begin
      m1_rsp.arready = s_rsp.arready; m1_rsp.rvalid = s_rsp.rvalid;
      m1_rsp.rdata   = s_rsp.rdata;   m1_rsp.rresp  = s_rsp.rresp;
    end
  end

endmodule
