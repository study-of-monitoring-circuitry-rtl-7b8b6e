`timescale 1ns / 1ps
// pvmap_pkg: types and constants shared by the performance-variation (PV)
// mapping monitor.
//
// The monitor measures the frequency of many ring-oscillator (RO) sensors
// spread over an FPGA fabric. Each sensor counts RO edges with a residue
// number system (RNS) ring counter built from three one-hot shift-register
// rings of length 29, 31 and 32 (moduli from the design; 29*31*32 = 28,768
// distinct counts). This package holds those moduli, the INIT words of the
// three rings, the RO types and their nominal (slow-corner) periods, the
// controller timing defaults and the AXI4-Lite channel structs used between
// the controller, the interconnect and the memory controller.
package pvmap_pkg;

  // ---------------------------------------------------------------- RNS
  localparam int unsigned MOD0 = 29;
  localparam int unsigned MOD1 = 31;
  localparam int unsigned MOD2 = 32;
  localparam int unsigned RNS_RANGE = MOD0 * MOD1 * MOD2;  // 28,768

  // INIT words of the three shift-register LUTs: a single one at the last
  // bit of each ring (bit 28, 30 and 31).
  localparam logic [31:0] INIT0 = 32'h1000_0000;
  localparam logic [31:0] INIT1 = 32'h4000_0000;
  localparam logic [31:0] INIT2 = 32'h8000_0000;

  // Tap address that closes each ring while counting (ring length - 1).
  localparam logic [4:0] TAP0 = 5'(MOD0 - 1);
  localparam logic [4:0] TAP1 = 5'(MOD1 - 1);
  localparam logic [4:0] TAP2 = 5'(MOD2 - 1);
  localparam logic [14:0] COUNT_ADDR = {TAP0, TAP1, TAP2};

  // One stored measurement: the three 5-bit residues in a 16-bit record.
  typedef struct packed {
    logic       spare;   // always 0
    logic [4:0] r29;     // residue of the 29-ring
    logic [4:0] r31;     // residue of the 31-ring
    logic [4:0] r32;     // residue of the 32-ring
  } residue_rec_t;

  // ------------------------------------------------------- ring oscillators
  typedef enum logic [1:0] {
    RO_HIGH        = 2'd0,  // 8 LUT6, unused LUT inputs tied to 1
    RO_LOW         = 2'd1,  // 8 LUT6, unused LUT inputs tied to 0
    RO_8_CC2_8_CC2 = 2'd2,  // 32 LUT5 + 4 carry chains over two CLBs
    RO_16_8_CC2    = 2'd3   // 24 LUT5 + 2 carry chains over two CLBs
  } ro_type_e;

  // Nominal period in ps of each RO type, from its slow-corner
  // post-implementation frequency: 56.657224, 56.657224, 24.38073 and
  // 17.93014 MHz.
  function automatic int unsigned ro_nominal_period_ps(ro_type_e t);
    case (t)
      RO_HIGH, RO_LOW: return 17650;
      RO_8_CC2_8_CC2:  return 41016;
      default:         return 55772;
    endcase
  endfunction

  // ------------------------------------------------------ controller timing
  // At the 50 MHz controller clock: 10.24 us of RO settling, 40.96 us of
  // counting.
  localparam int unsigned SETTLE_CYCLES_DEF = 512;
  localparam int unsigned COUNT_CYCLES_DEF  = 2048;

  // --------------------------------------------------------------- AXI-Lite
  localparam int unsigned AXI_AW = 32;
  localparam int unsigned AXI_DW = 32;

  typedef struct packed {
    logic [AXI_AW-1:0] awaddr;
    logic              awvalid;
    logic [AXI_DW-1:0] wdata;
    logic [AXI_DW/8-1:0] wstrb;
    logic              wvalid;
    logic              bready;
    logic [AXI_AW-1:0] araddr;
    logic              arvalid;
    logic              rready;
  } axil_req_t;

  typedef struct packed {
    logic              awready;
    logic              wready;
    logic [1:0]        bresp;
    logic              bvalid;
    logic              arready;
    logic [AXI_DW-1:0] rdata;
    logic [1:0]        rresp;
    logic              rvalid;
  } axil_rsp_t;

endpackage
