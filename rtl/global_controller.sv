`timescale 1ns / 1ps
// global_controller: state machine that measures every sensor of the PV map
// in turn and stores the three residues of each measurement in memory
// through an AXI4-Lite master port.
//
// For each sensor (N_REPEAT passes over sensors 0..N_SENSORS-1):
//   SELECT   sensor_id selects the sensor's residue outputs.
//   SETTLE   ro_select of the sensor is raised and the RO runs for
//            SETTLE_CYCLES (512 cycles = 10.24 us at 50 MHz) to reach a steady
//            frequency. With REINIT set, counter_init is high for the first
//            half of this phase so the sensor's rings reload their INIT words.
//   COUNT    counter_select is raised for COUNT_CYCLES (2048 = 40.96 us).
//            Settling plus counting stays within a 50 us activation budget
//            that avoids self-heating.
//   DRAIN    counter_select is dropped first and the RO kept running for
//            DRAIN_CYCLES so the fall crosses the sensor's synchroniser (at
//            least 2*Fc/Fro cycles are needed).
//   SWEEP    ro_select is dropped and the three 5-bit address fields are swept
//            together from 0 to 31. For each ring the first address at which
//            its residue bit is 1 is stored. Ascending order matters: the
//            bits above a shorter ring's tap hold delayed copies of the one.
//   WRITE    the address fields return to the counting taps and the 16-bit
//            record {0, r29, r31, r32} is written at byte address
//            BASE_ADDR + 2*(pass*N_SENSORS + sensor) (one halfword lane of a
//            32-bit write, selected by wstrb), then the write response is
//            awaited.
// done rises after the last record is acknowledged and stays high until the
// next start. error is set if any write response is not OKAY.
//
// The sequence, the two phase lengths, the separate disabling of counter and
// RO, the address sweep with first-one capture and the 16-bit record follow
// the design. The start/done handshake, DRAIN_CYCLES = 16, the record's field
// order, its address map and the pass-major order of repetitions are this
// implementation's choices.
module global_controller
  import pvmap_pkg::*;
#(
  parameter int unsigned N_SENSORS     = 1400,
  parameter int unsigned N_REPEAT      = 1,
  parameter int unsigned SETTLE_CYCLES = SETTLE_CYCLES_DEF,
  parameter int unsigned COUNT_CYCLES  = COUNT_CYCLES_DEF,
  parameter int unsigned DRAIN_CYCLES  = 16,
  parameter bit          REINIT        = 1'b0,
  parameter logic [AXI_AW-1:0] BASE_ADDR = '0,
  localparam int unsigned IDW = $clog2(N_SENSORS)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  output logic                 busy,
  output logic                 done,
  output logic                 error,
  // sensor array
  output logic [IDW-1:0]       sensor_id,
  output logic [N_SENSORS-1:0] ro_select,
  output logic [N_SENSORS-1:0] counter_select,
  output logic                 counter_init,
  output logic [14:0]          addr,
  input  logic [2:0]           residues,
  // AXI4-Lite master (write only)
  output axil_req_t            m_axi_req,
  input  axil_rsp_t            m_axi_rsp
);

  typedef enum logic [3:0] {
    S_IDLE, S_SELECT, S_SETTLE, S_COUNT, S_DRAIN, S_SWEEP, S_WRITE, S_RESP, S_NEXT
  } state_e;

  localparam int unsigned TW = $clog2(SETTLE_CYCLES + COUNT_CYCLES + DRAIN_CYCLES + 64);
  localparam int unsigned RW = (N_REPEAT > 1) ? $clog2(N_REPEAT) : 1;

  state_e         state;
  logic [TW-1:0]  timer;
  logic [IDW-1:0] id;
  logic [RW-1:0]  pass;
  logic [5:0]     sweep;
  logic [2:0]     found;
  logic [4:0]     r29, r31, r32;
  logic           aw_done, w_done;
  logic [31:0]    rec_index;
  residue_rec_t   rec;

  assign rec = '{spare: 1'b0, r29: r29, r31: r31, r32: r32};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state          <= S_IDLE;
      timer          <= '0;
      id             <= '0;
      pass           <= '0;
      sweep          <= '0;
      found          <= '0;
      r29            <= '0;
      r31            <= '0;
      r32            <= '0;
      aw_done        <= 1'b0;
      w_done         <= 1'b0;
      rec_index      <= '0;
      ro_select      <= '0;
      counter_select <= '0;
      counter_init   <= 1'b0;
      done           <= 1'b0;
      error          <= 1'b0;
    end else begin
      case (state)
        S_IDLE: begin
          if (start) begin
            state     <= S_SELECT;
            id        <= '0;
            pass      <= '0;
            rec_index <= '0;
            done      <= 1'b0;
            error     <= 1'b0;
          end
        end
        S_SELECT: begin
          ro_select     <= N_SENSORS'(1) << id;
          counter_init  <= REINIT;
          timer         <= '0;
          state         <= S_SETTLE;
        end
        S_SETTLE: begin
          timer <= timer + 1'b1;
          if (32'(timer) == SETTLE_CYCLES / 2 - 1) counter_init <= 1'b0;
          if (32'(timer) == SETTLE_CYCLES - 1) begin
            counter_select <= N_SENSORS'(1) << id;
            timer          <= '0;
            state          <= S_COUNT;
          end
        end
        S_COUNT: begin
          timer <= timer + 1'b1;
          if (32'(timer) == COUNT_CYCLES - 1) begin
            counter_select <= '0;
            timer          <= '0;
            state          <= S_DRAIN;
          end
        end
        S_DRAIN: begin
          timer <= timer + 1'b1;
          if (32'(timer) == DRAIN_CYCLES - 1) begin
            ro_select <= '0;
            sweep     <= '0;
            found     <= '0;
            state     <= S_SWEEP;
          end
        end
        S_SWEEP: begin
          // residues reflect the address {sweep, sweep, sweep} of this cycle
          if (residues[2] && !found[2]) begin r29 <= sweep[4:0]; found[2] <= 1'b1; end
          if (residues[1] && !found[1]) begin r31 <= sweep[4:0]; found[1] <= 1'b1; end
          if (residues[0] && !found[0]) begin r32 <= sweep[4:0]; found[0] <= 1'b1; end
          sweep <= sweep + 1'b1;
          if (sweep == 6'd31) begin
            aw_done <= 1'b0;
            w_done  <= 1'b0;
            state   <= S_WRITE;
          end
        end
        S_WRITE: begin
          if (m_axi_rsp.awready) aw_done <= 1'b1;
          if (m_axi_rsp.wready)  w_done  <= 1'b1;
          if ((aw_done || m_axi_rsp.awready) && (w_done || m_axi_rsp.wready)) state <= S_RESP;
        end
        S_RESP: begin
          if (m_axi_rsp.bvalid) begin
            if (m_axi_rsp.bresp != 2'b00) error <= 1'b1;
            rec_index <= rec_index + 1'b1;
            state     <= S_NEXT;
          end
        end
        S_NEXT: begin
          if (32'(id) == N_SENSORS - 1) begin
            id <= '0;
            if (32'(pass) == N_REPEAT - 1) begin
              done  <= 1'b1;
              state <= S_IDLE;
            end else begin
              pass  <= pass + 1'b1;
              state <= S_SELECT;
            end
          end else begin
            id    <= id + 1'b1;
            state <= S_SELECT;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy      = (state != S_IDLE);
  assign sensor_id = id;
  assign addr      = (state == S_SWEEP) ? {3{sweep[4:0]}} : COUNT_ADDR;

  // AXI4-Lite write of the current record; reads are never issued.
  logic [AXI_AW-1:0] wr_addr;
  assign wr_addr = BASE_ADDR + AXI_AW'({rec_index, 1'b0});

  always_comb begin
    m_axi_req         = '0;
    m_axi_req.awaddr  = wr_addr;
    m_axi_req.awvalid = (state == S_WRITE) && !aw_done;
    m_axi_req.wdata   = {2{16'(rec)}};
    m_axi_req.wstrb   = wr_addr[1] ? 4'b1100 : 4'b0011;
    m_axi_req.wvalid  = (state == S_WRITE) && !w_done;
    m_axi_req.bready  = (state == S_RESP);
  end

endmodule
