// droic_pkg: types and constants shared by the digital readout of the
// wide-dynamic-range pixel sensor.
//
// Each pixel produces an 11-bit word: a 10-bit trip count and one window
// flag. The flag is 1 when the pixel was bright enough to trip at least once
// inside the short window T1 and therefore stopped counting at T1; it is 0
// when the pixel kept integrating up to the long window T2. The 10-bit count,
// the 11-bit word and the 16x16 array size follow the design description;
// the configuration record loaded through the scan chain (its fields, widths
// and reset values) is this design's own choice.
package droic_pkg;
  timeunit 1ns; timeprecision 1ps;

  localparam int unsigned CNT_W   = 10;          // pixel counter width
  localparam int unsigned PIX_W   = CNT_W + 1;   // counter + window flag
  localparam int unsigned T1CNT_W = 16;          // HCLK cycles from reset to INT_CLK

  // One pixel's readout word; bit 10 is the window flag, bits 9:0 the count.
  typedef struct packed {
    logic             win_t1;  // 1: integration stopped at T1 (bright pixel)
    logic [CNT_W-1:0] cnt;     // number of comparator trips in the window
  } pix_word_t;

  // Settings shifted in through the scan chain (MSB first).
  typedef struct packed {
    logic [T1CNT_W-1:0] t1_count; // INT_CLK fires this many HCLK cycles after reset
    logic               testmode; // readout block sends the 2047/0 test pattern
    logic               cal_en;   // front ends integrate the calibration current
    logic               pd_en;    // front ends integrate the photodiode current
  } scan_cfg_t;

  localparam int unsigned SCAN_W = $bits(scan_cfg_t);

  // Reset value: T1 = 4 HCLK cycles (2 us at a 2 MHz HCLK), photodiodes on.
  localparam scan_cfg_t SCAN_CFG_RESET = '{t1_count: T1CNT_W'(4), testmode: 1'b0,
                                           cal_en: 1'b0, pd_en: 1'b1};
endpackage
