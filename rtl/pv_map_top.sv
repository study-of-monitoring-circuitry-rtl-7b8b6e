`timescale 1ns / 1ps
// pv_map_top: performance-variation (PV) mapping monitor for ageing.
//
// An array of ring-oscillator sensors covers the fabric. The global
// controller activates one sensor at a time, lets its oscillator settle,
// counts its edges for a fixed window with the sensor's RNS ring counter,
// reads the three residues back by sweeping the counters' tap addresses and
// writes them as a 16-bit record into block RAM over AXI4-Lite. A host reads
// the RAM through a second AXI4-Lite master (the JTAG-to-AXI bridge, which is
// outside this module: its master port is brought out as jtag_axi_req /
// jtag_axi_rsp) and decodes each record into an edge count and a frequency.
// A falling frequency over the product's life shows ageing of the LUTs,
// carry chains and routing inside that oscillator.
//
// Structure (as in the design): sensor_array (sensor 0 = reference counter
// on the 20 MHz clock, sensors 1..N-1 = RO sensors), global_controller,
// axi_interconnect (controller = master 0, JTAG bridge = master 1) and
// bram_ctrl. The 50 MHz controller clock and 20 MHz reference clock come from
// one PLL outside this module.
//
// Defaults give the main configuration: 1400 sensors measured once with the
// ro_8_cc2_8_cc2 oscillator, 10.24 us settling and 40.96 us counting at
// 50 MHz. The repeated-measurement variant is N_SENSORS = 140,
// N_REPEAT = 100, REINIT = 1, MEM_BYTES = 32768.
// start (one cycle) begins a run; busy is high during it; done rises when
// the last record is in memory.
module pv_map_top
  import pvmap_pkg::*;
#(
  parameter int unsigned N_SENSORS     = 1400,
  parameter ro_type_e    RO_TYPE       = RO_8_CC2_8_CC2,
  parameter int unsigned N_REPEAT      = 1,
  parameter bit          REINIT        = 1'b0,
  parameter int unsigned SETTLE_CYCLES = SETTLE_CYCLES_DEF,
  parameter int unsigned COUNT_CYCLES  = COUNT_CYCLES_DEF,
  parameter int unsigned PV_SPREAD_PPM = 0,
  parameter int unsigned MEM_BYTES     = 2 ** $clog2(2 * N_SENSORS * N_REPEAT)
) (
  input  logic      ctrl_clk,     // 50 MHz
  input  logic      ref_clk,      // 20 MHz, same PLL as ctrl_clk
  input  logic      rst_n,
  input  logic      start,
  output logic      busy,
  output logic      done,
  output logic      error,
  input  axil_req_t jtag_axi_req,
  output axil_rsp_t jtag_axi_rsp
);

  localparam int unsigned IDW = $clog2(N_SENSORS);

  logic [IDW-1:0]       sensor_id;
  logic [N_SENSORS-1:0] ro_select, counter_select;
  logic                 counter_init;
  logic [14:0]          addr;
  logic [2:0]           residues;
  axil_req_t            ctrl_req, mem_req;
  axil_rsp_t            ctrl_rsp, mem_rsp;

  sensor_array #(
    .N_SENSORS(N_SENSORS), .RO_TYPE(RO_TYPE), .PV_SPREAD_PPM(PV_SPREAD_PPM)
  ) u_sensors (
    .ctrl_clk, .ref_clk, .ro_select, .counter_select, .counter_init,
    .addr, .sensor_id, .residues
  );

  global_controller #(
    .N_SENSORS(N_SENSORS), .N_REPEAT(N_REPEAT), .SETTLE_CYCLES(SETTLE_CYCLES),
    .COUNT_CYCLES(COUNT_CYCLES), .REINIT(REINIT)
  ) u_ctrl (
    .clk(ctrl_clk), .rst_n, .start, .busy, .done, .error,
    .sensor_id, .ro_select, .counter_select, .counter_init, .addr, .residues,
    .m_axi_req(ctrl_req), .m_axi_rsp(ctrl_rsp)
  );

  axi_interconnect u_xbar (
    .clk(ctrl_clk), .rst_n,
    .m0_req(ctrl_req), .m0_rsp(ctrl_rsp),
    .m1_req(jtag_axi_req), .m1_rsp(jtag_axi_rsp),
    .s_req(mem_req), .s_rsp(mem_rsp)
  );

  bram_ctrl #(.MEM_BYTES(MEM_BYTES)) u_mem (
    .clk(ctrl_clk), .rst_n, .s_axi_req(mem_req), .s_axi_rsp(mem_rsp)
  );

endmodule
