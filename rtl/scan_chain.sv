// scan_chain: serially loaded configuration register.
//
// The description says only that a scan chain supplies fixed, user-controlled
// register settings at start-up. This design's choice of interface: while
// scan_en is high, every rising edge of scan_clk shifts scan_in into a
// SCAN_W-bit shift register (MSB of the record first), and scan_out is the
// bit falling out of the far end, so chips can be daisy-chained. A rising
// edge of scan_clk with scan_load high copies the shift register into the
// shadow register `cfg`, so the settings change in one step. Reset puts
// SCAN_CFG_RESET (see droic_pkg) into both registers.
module scan_chain
  import droic_pkg::*;
(
  input  logic      scan_clk,
  input  logic      rst,       // asynchronous, active high
  input  logic      scan_en,
  input  logic      scan_load,
  input  logic      scan_in,
  output logic      scan_out,
  output scan_cfg_t cfg
);
  timeunit 1ns; timeprecision 1ps;

  logic [SCAN_W-1:0] sr;

  always_ff @(posedge scan_clk or posedge rst) begin
    if (rst) begin
      sr  <= SCAN_CFG_RESET;
      cfg <= SCAN_CFG_RESET;
    end else begin
      if (scan_en)   sr  <= {sr[SCAN_W-2:0], scan_in};
      if (scan_load) cfg <= scan_cfg_t'(sr);
    end
  end

  assign scan_out = sr[SCAN_W-1];
endmodule
