`timescale 1ns / 1ps
// srl32: 32-bit shift register with an addressable tap, modelled on the
// SRLC32E shift-register LUT of 7-series SLICEMs.
//
// On each rising clk edge with ce high, d is shifted into bit 0 and every bit
// moves up by one. q is the bit selected by addr (asynchronous read, like a
// LUT) and q31 is the last bit. The register powers up holding INIT, as the
// FPGA configuration would load it. The load input, which a plain SRLC32E
// lacks, reloads INIT synchronously and takes priority over ce; it exists for
// the repeated-measurement variant of the monitor, where the rings must be
// reinitialised between measurements. Tie it low when that is not needed.
module srl32 #(
  parameter logic [31:0] INIT = 32'h0000_0000
) (
  input  logic       clk,
  input  logic       ce,
  input  logic       load,
  input  logic       d,
  input  logic [4:0] addr,
  output logic       q,
  output logic       q31
);

  logic [31:0] sr = INIT;  // contents loaded by configuration

  always_ff @(posedge clk) begin
    if (load)    sr <= INIT;
    else if (ce) sr <= {sr[30:0], d};
  end

  assign q   = sr[addr];
  assign q31 = sr[31];

endmodule
