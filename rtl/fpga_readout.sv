// fpga_readout: output stage between the pixel chain and the FPGA.
//
// The 11-bit word at the end of the pixel chain is re-sampled into an output
// register clocked by PCLK, and PCLK is buffered out as DCLK so the receiver
// can sample D with the same clock that launched it. On the rising PCLK edge
// that shifts the chain, the output register captures the word that was on
// the chain's output just before the shift; D therefore changes on the rising
// edge of DCLK and is stable at its falling edge.
//
// Test mode: an 11-bit register clocked by inverted PCLK loads its own
// inverse each cycle, and is held at zero while TESTMODE is low. With
// TESTMODE high, D alternates between 0 and 2047 on successive PCLK cycles,
// which lets the receiver find its sampling phase.
//
// The test register, the multiplexer and the output register follow the
// block diagram. The description's text says the data is re-sampled on the
// falling edge of PCLK, while its diagram clocks the output register with
// PCLK directly and only the test register with inverted PCLK. This module
// follows the diagram: sampling on the falling edge would come after the
// first shift and lose the first word of every frame.
module fpga_readout
  import droic_pkg::*;
(
  input  logic             pclk,
  input  logic             testmode,
  input  logic [PIX_W-1:0] pix_data,
  output logic [PIX_W-1:0] d,
  output logic             dclk
);
  timeunit 1ns; timeprecision 1ps;

  logic [PIX_W-1:0] dtest;

  always_ff @(negedge pclk or negedge testmode) begin
    if (!testmode) dtest <= '0;
    else           dtest <= ~dtest;
  end

  always_ff @(posedge pclk) begin
    d <= testmode ? dtest : pix_data;
  end

  assign dclk = pclk;
endmodule
