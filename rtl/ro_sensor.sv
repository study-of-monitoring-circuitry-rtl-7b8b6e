`timescale 1ns / 1ps
// ro_sensor: one ageing sensor of the PV map, a gated ring oscillator and an
// RNS ring counter placed next to each other.
//
// ro_select gates the oscillator. counter_select, from the controller clock
// domain, passes through select_sync (one controller-clock flip-flop, two
// RO-clock flip-flops) and enables the counter, so the counter only sees a
// clean enable that is synchronous to the oscillator. The counter's three
// ring outputs q are the sensor's residue outputs; addr chooses the tapped
// positions (COUNT_ADDR while counting, swept while reading).
//
// counter_init exists only for the repeated-measurement variant: it is
// passed through a second select_sync and, while high in the RO domain,
// reloads the rings' INIT words. It is a level and needs the RO running, so
// the controller raises it during the settling phase. Tie it low otherwise.
//
// Timing: the counted window begins about 1 controller cycle + 2 RO cycles
// after counter_select rises and ends the same delay after it falls; the
// controller must keep ro_select high until the fall has crossed (at least
// 2*Fc/Fro controller cycles).
module ro_sensor
  import pvmap_pkg::*;
#(
  parameter ro_type_e RO_TYPE       = RO_8_CC2_8_CC2,
  parameter int       VARIATION_PPM = 0
) (
  input  logic        ctrl_clk,
  input  logic        ro_select,
  input  logic        counter_select,
  input  logic        counter_init,
  input  logic [14:0] addr,
  output logic [2:0]  residues
);

  logic ro_clk;
  logic count_en;
  logic init_sync;

  ring_oscillator #(.RO_TYPE(RO_TYPE), .VARIATION_PPM(VARIATION_PPM)) u_ro (
    .en(ro_select), .ro_out(ro_clk)
  );

  select_sync u_sync_count (
    .ctrl_clk, .ro_clk, .sel(counter_select), .sel_sync(count_en)
  );

  select_sync u_sync_init (
    .ctrl_clk, .ro_clk, .sel(counter_init), .sel_sync(init_sync)
  );

  rns_ring_counter u_counter (
    .clk(ro_clk), .ce(count_en), .load(init_sync), .addr, .q(residues)
  );

endmodule
