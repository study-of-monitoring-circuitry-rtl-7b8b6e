`timescale 1ns / 1ps
// ref_sensor: the reference sensor (sensor 0) of the PV map. It has no ring
// oscillator: its RNS ring counter counts the 20 MHz reference clock, so the
// decoded result checks the whole measurement and decoding chain against a
// known frequency.
//
// The reference clock and the 50 MHz controller clock come from the same
// PLL, so counter_select drives the counter enable directly, without the
// synchronising flip-flops of the RO sensors; the counted window is then
// almost exactly the controller's. counter_init reloads the rings' INIT
// words (repeated-measurement variant only) and is also used directly.
// residues is combinational from addr.
module ref_sensor (
  input  logic        ref_clk,
  input  logic        counter_select,
  input  logic        counter_init,
  input  logic [14:0] addr,
  output logic [2:0]  residues
);

  rns_ring_counter u_counter (
    .clk(ref_clk), .ce(counter_select), .load(counter_init), .addr, .q(residues)
  );

endmodule
