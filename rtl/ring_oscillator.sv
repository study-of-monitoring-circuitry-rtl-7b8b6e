`timescale 1ns / 1ps
// ring_oscillator: behavioural model of the gated ring oscillators used as
// ageing sensors. It is a simulation model, not synthesizable logic: the real
// oscillator is a combinational loop of hand-placed LUTs and carry chains
// whose frequency is set by the silicon, so here the loop is replaced by a
// timed toggle.
//
// Four structures exist (RO_TYPE):
//   RO_HIGH / RO_LOW   one CLB, 8 LUT6: one LUT6 is the AND gate (inputs A1
//                      from the ring and A2 = en), seven are inverters driven
//                      on A1; all other LUT inputs are tied to 1 (RO_HIGH) or
//                      0 (RO_LOW) so the signal takes two opposite paths
//                      through each LUT's multiplexer tree.
//   RO_8_CC2_8_CC2     two CLBs, 32 LUT5 and 4 carry chains.
//   RO_16_8_CC2        two CLBs, 24 LUT5 and 2 carry chains.
// In the carry-chain types, A6 of every LUT is tied to 1 so each LUT6 splits
// into two LUT5s: O5 is in the ring, O6 drives the carry chain S inputs,
// which are held at 4'b1110 so that the chain works as a buffer along its
// longest path. One LUT is the enable AND gate, the rest are inverters.
//
// Model: while en is low the output is 0 (the AND gate breaks the loop).
// When en rises, the output toggles every half period, starting with a
// rising edge half a period after en. PERIOD_PS defaults to the nominal
// slow-corner period of the chosen type (pvmap_pkg::ro_nominal_period_ps);
// VARIATION_PPM shifts it, to stand for process variation or ageing of one
// placed instance (positive = slower). The structures and nominal
// frequencies follow the design; the delay model itself is this model's.
//
// Interface: en (level), ro_out (oscillation). Only the model is timed.
// A synthesis tool reading this model reports a combinational loop through
// osc: that loop is the oscillator, which on the FPGA is built from
// instantiated, placed LUT and carry primitives rather than inferred.
module ring_oscillator
  import pvmap_pkg::*;
#(
  parameter ro_type_e    RO_TYPE       = RO_8_CC2_8_CC2,
  parameter int          VARIATION_PPM = 0,
  parameter int unsigned PERIOD_PS     =
      ro_nominal_period_ps(RO_TYPE) +
      int'((longint'(ro_nominal_period_ps(RO_TYPE)) * VARIATION_PPM) / 1000000)
) (
  input  logic en,
  output logic ro_out
);

  localparam realtime HALF = (PERIOD_PS / 2.0) * 1ps;

  logic osc;

  initial osc = 1'b0;

  always begin
    if (!en) begin
      osc = 1'b0;
      wait (en);
    end
    #(HALF);
    osc = en ? ~osc : 1'b0;
  end

  assign ro_out = osc;

endmodule
