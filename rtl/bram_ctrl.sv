`timescale 1ns / 1ps
// bram_ctrl: memory controller and block RAM that hold the measurement
// records. It is an AXI4-Lite slave over a RAM of MEM_BYTES bytes organised
// as 32-bit words with byte write enables, so that 16-bit residue records
// can be written one halfword lane at a time.
//
// Writes: a write is accepted in the cycle in which both awvalid and wvalid
// are high and no response is pending (awready = wready, one cycle), the
// bytes selected by wstrb are written, and bvalid follows one cycle later.
// Reads: arready is high when no read data is pending; the word is read from
// the RAM on the handshake edge and presented with rvalid one cycle later,
// held until rready. Addresses beyond the RAM return SLVERR and do not write.
//
// The memory size follows the design's sizing rule (16 bits per sensor per
// measurement, 1400 sensors once = 2,800 bytes, rounded up to a power of
// two); the AXI4-Lite protocol details are this implementation's choices.
module bram_ctrl
  import pvmap_pkg::*;
#(
  parameter int unsigned MEM_BYTES = 4096,
  localparam int unsigned WORDS = MEM_BYTES / 4,
  localparam int unsigned WAW   = $clog2(WORDS)
) (
  input  logic      clk,
  input  logic      rst_n,
  input  axil_req_t s_axi_req,
  output axil_rsp_t s_axi_rsp
);

  logic [31:0] mem [WORDS];

  logic        bvalid, rvalid;
  logic [1:0]  bresp, rresp;
  logic [31:0] rdata;
  logic        wr_fire, rd_fire;
  logic        wr_in_range, rd_in_range;
  logic [WAW-1:0] wr_word, rd_word;

  assign wr_word     = s_axi_req.awaddr[WAW+1:2];
  assign rd_word     = s_axi_req.araddr[WAW+1:2];
  assign wr_in_range = (s_axi_req.awaddr < AXI_AW'(MEM_BYTES));
  assign rd_in_range = (s_axi_req.araddr < AXI_AW'(MEM_BYTES));

  assign wr_fire = s_axi_req.awvalid && s_axi_req.wvalid && !bvalid;
  assign rd_fire = s_axi_req.arvalid && !rvalid;

  // RAM: byte-enabled write port, registered read port
  always_ff @(posedge clk) begin
    if (wr_fire && wr_in_range) begin
      for (int b = 0; b < 4; b++)
        if (s_axi_req.wstrb[b]) mem[wr_word][8*b +: 8] <= s_axi_req.wdata[8*b +: 8];
    end
    if (rd_fire) rdata <= rd_in_range ? mem[rd_word] : '0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bvalid <= 1'b0;
      bresp  <= 2'b00;
      rvalid <= 1'b0;
      rresp  <= 2'b00;
    end else begin
      if (wr_fire) begin
        bvalid <= 1'b1;
        bresp  <= wr_in_range ? 2'b00 : 2'b10;
      end else if (s_axi_req.bready) begin
        bvalid <= 1'b0;
      end
      if (rd_fire) begin
        rvalid <= 1'b1;
        rresp  <= rd_in_range ? 2'b00 : 2'b10;
      end else if (s_axi_req.rready) begin
        rvalid <= 1'b0;
      end
    end
  end

  always_comb begin
    s_axi_rsp         = '0;
    s_axi_rsp.awready = wr_fire;
    s_axi_rsp.wready  = wr_fire;
    s_axi_rsp.bvalid  = bvalid;
    s_axi_rsp.bresp   = bresp;
    s_axi_rsp.arready = rd_fire;
    s_axi_rsp.rvalid  = rvalid;
    s_axi_rsp.rdata   = rdata;
    s_axi_rsp.rresp   = rresp;
  end

  // A response, once raised, stays until it is taken.
  a_bvalid_hold: assert property (@(posedge clk) disable iff (!rst_n)
    bvalid && !s_axi_req.bready |=> bvalid);
  a_rvalid_hold: assert property (@(posedge clk) disable iff (!rst_n)
    rvalid && !s_axi_req.rready |=> rvalid && $stable(rdata));

endmodule
