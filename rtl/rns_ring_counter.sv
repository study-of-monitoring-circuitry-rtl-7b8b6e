`timescale 1ns / 1ps
// rns_ring_counter: compact frequency counter in residue number system form.
//
// Three srl32 shift registers each hold a single one (INIT 0x10000000,
// 0x40000000, 0x80000000). While counting, the address fields select taps
// 28, 30 and 31 and each register's tapped output is fed back to its own
// input, so the three registers become one-hot rings of length 29, 31 and 32
// that advance on every rising edge of clk while ce is high. After k counted
// edges the one of ring i sits at position (k - 1) mod m_i. To read the
// count, ce is dropped and the 15-bit address (three 5-bit fields, one per
// ring) is swept; q[i] is 1 when field i points at the one. The three found
// positions are the residues of k - 1; the Chinese remainder theorem gives
// k - 1 modulo 28,768 (decoding is done off-chip).
//
// Ring structure, INIT words and the moduli follow the design; the field
// order of addr (bits 14:10 for the 29-ring, 9:5 for the 31-ring, 4:0 for
// the 32-ring) and the load input used by the repeated-measurement variant
// are this implementation's choices.
//
// Interface: clk is the counted signal (RO output or reference clock), ce the
// counting enable already synchronous to clk. addr must hold COUNT_ADDR
// whenever ce or load is high. q is combinational from addr.
module rns_ring_counter
  import pvmap_pkg::*;
(
  input  logic        clk,
  input  logic        ce,
  input  logic        load,
  input  logic [14:0] addr,
  output logic [2:0]  q
);

  logic [2:0] q31_unused;

  srl32 #(.INIT(INIT0)) u_ring29 (
    .clk, .ce, .load, .d(q[2]), .addr(addr[14:10]), .q(q[2]), .q31(q31_unused[2])
  );
  srl32 #(.INIT(INIT1)) u_ring31 (
    .clk, .ce, .load, .d(q[1]), .addr(addr[9:5]), .q(q[1]), .q31(q31_unused[1])
  );
  srl32 #(.INIT(INIT2)) u_ring32 (
    .clk, .ce, .load, .d(q[0]), .addr(addr[4:0]), .q(q[0]), .q31(q31_unused[0])
  );

endmodule
