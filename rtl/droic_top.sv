// droic_top: digital readout of the wide-dynamic-range digital-pixel sensor,
// with the receiver-side calibrator beside it.
//
// Sensor chip (left half of the port list): the timing and control block
// turns HCLK and LCLK into GLOBAL_RESET, INT_CLK, RD_EN and PCLK; the pixel
// array counts comparator trips per pixel with the adaptive two-window
// integration (T1 = t1_count HCLK cycles, T2 = high phase of LCLK) and shifts
// the 11-bit words out during the low phase of LCLK; the readout block
// re-samples them onto D and DCLK. The scan chain holds t1_count, the test
// mode of the readout block and the two front-end switches CAL_EN and PD_EN.
// The analog front end of each pixel (photodiode, integration capacitor,
// comparator, calibration current mirror, reset transistor) is not logic: it
// connects through comp (in) and fd_rst (out), one per pixel, indexed
// row*NCOLS+col, and through cal_en / pd_en.
//
// Receiver (cal_* ports): the fixed-pattern-noise calibrator, which in the
// described system runs off chip on the FPGA that captures D. It has its own
// clock and takes one captured pixel word per cycle.
//
// The description gives the readout block clock, sync and data outputs but
// not what sync is; here sync is RD_EN brought out.
//
// Frame timing: a frame is one LCLK period. Readout word j (j-th rising DCLK
// edge after RD_EN, counting from 1, D valid from that edge) is the pixel at
// row (j-1)/NCOLS, column NCOLS-1-(j-1)%NCOLS.
module droic_top
  import droic_pkg::*;
#(
  parameter int unsigned NROWS       = 16,
  parameter int unsigned NCOLS       = 16,
  parameter realtime     PULSE_W     = 0.3ns,
  parameter int unsigned GRST_CYCLES = 1,
  parameter int unsigned WIN_RATIO   = 1024,
  parameter int unsigned RECIP_SHIFT = 32
) (
  // chip clocks and reset
  input  logic               hclk,
  input  logic               lclk,
  input  logic               reset,
  // scan chain
  input  logic               scan_clk,
  input  logic               scan_en,
  input  logic               scan_load,
  input  logic               scan_in,
  output logic               scan_out,
  // analog front ends
  input  logic               comp   [NROWS*NCOLS],
  output logic               fd_rst [NROWS*NCOLS],
  output logic               cal_en,
  output logic               pd_en,
  // readout to the FPGA
  output logic [PIX_W-1:0]   d,
  output logic               dclk,
  output logic               sync,       // frame sync: high while a frame is read out
  // receiver-side calibrator
  input  logic               cal_clk,
  input  logic               cal_rst,
  input  logic               cal_mode,
  input  logic               cal_in_valid,
  input  logic               cal_in_first,
  input  logic [PIX_W-1:0]   cal_in_code,
  output logic               cal_out_valid,
  output logic [CNT_W+$clog2(WIN_RATIO)-1:0] cal_out_lin,
  output logic signed [CNT_W+$clog2(WIN_RATIO):0] cal_out_code,
  output logic               cal_busy,
  output logic               cal_done,
  output logic [CNT_W+$clog2(WIN_RATIO)-1:0] cal_avg
);
  timeunit 1ns; timeprecision 1ps;

  scan_cfg_t cfg;
  logic      global_reset, int_clk, rd_en, pclk;
  pix_word_t chain_out;

  scan_chain u_scan (
    .scan_clk  (scan_clk),
    .rst       (reset),
    .scan_en   (scan_en),
    .scan_load (scan_load),
    .scan_in   (scan_in),
    .scan_out  (scan_out),
    .cfg       (cfg)
  );

  timing_control #(.GRST_CYCLES(GRST_CYCLES)) u_tc (
    .hclk         (hclk),
    .lclk         (lclk),
    .rst          (reset),
    .t1_count     (cfg.t1_count),
    .global_reset (global_reset),
    .int_clk      (int_clk),
    .rd_en        (rd_en),
    .pclk         (pclk)
  );

  pixel_array #(.NROWS(NROWS), .NCOLS(NCOLS), .PULSE_W(PULSE_W)) u_array (
    .comp         (comp),
    .fd_rst       (fd_rst),
    .global_reset (global_reset),
    .int_clk      (int_clk),
    .read_en      (rd_en),
    .pclk         (pclk),
    .dout         (chain_out)
  );

  fpga_readout u_ro (
    .pclk     (pclk),
    .testmode (cfg.testmode),
    .pix_data (chain_out),
    .d        (d),
    .dclk     (dclk)
  );

  // Frame sync for the receiver: RD_EN itself. D carries word 0 from the
  // first rising DCLK edge after sync rises.
  assign sync = rd_en;

  assign cal_en = cfg.cal_en;
  assign pd_en  = cfg.pd_en;

  fpn_calibrator #(
    .NPIX(NROWS*NCOLS), .WIN_RATIO(WIN_RATIO), .RECIP_SHIFT(RECIP_SHIFT)
  ) u_cal (
    .clk       (cal_clk),
    .rst       (cal_rst),
    .cal_mode  (cal_mode),
    .in_valid  (cal_in_valid),
    .in_first  (cal_in_first),
    .in_code   (cal_in_code),
    .out_valid (cal_out_valid),
    .out_lin   (cal_out_lin),
    .out_cal   (cal_out_code),
    .cal_busy  (cal_busy),
    .cal_done  (cal_done),
    .avg       (cal_avg)
  );
endmodule
