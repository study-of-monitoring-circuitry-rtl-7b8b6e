`timescale 1ns / 1ps
// select_sync: carries a level from the controller clock domain into a ring
// oscillator's clock domain.
//
// FF#0 registers the level on the controller clock, removing any glitch from
// the controller's logic; FF#1 and FF#2 then sample it on the RO clock as a
// two-flip-flop synchroniser against metastability. The output is the
// counter enable seen by the RNS counter. Rising and falling edges of sel
// both reach sel_sync 1 controller cycle plus 2 RO cycles later, so the
// counting window seen by the counter starts and ends on RO edges (T'm in
// the accuracy analysis) rather than on controller edges (Tm). The
// three-stage structure and clocking follow the design; power-up values of
// 0 (no reset, like the configured FPGA flip-flops) are this
// implementation's choice.
module select_sync (
  input  logic ctrl_clk,
  input  logic ro_clk,
  input  logic sel,       // from the controller, ctrl_clk domain
  output logic sel_sync   // to the counter, ro_clk domain
);

  // power-up values loaded by configuration
  logic ff0 = 1'b0;
  logic ff1 = 1'b0;
  logic ff2 = 1'b0;

  always_ff @(posedge ctrl_clk) ff0 <= sel;

  always_ff @(posedge ro_clk) begin
    ff1 <= ff0;
    ff2 <= ff1;
  end

  assign sel_sync = ff2;

endmodule
