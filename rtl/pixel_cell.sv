// pixel_cell: digital part of one digital-pixel ADC.
//
// The analog front end (photodiode, direct-injection transistor, integration
// capacitor on node FD and the inverter-chain comparator) sits outside this
// module; it delivers `comp`, high when FD has crossed the trip point, and
// takes back `fd_rst`, which holds FD at its reset level.
//
// Inside: the pulse generator turns every trip into a fixed-width pulse that
// both resets FD and clocks the counter; the ITCU decides at INT_CLK whether
// the pixel stops at the short window T1 or continues to the long window T2;
// the counter counts the pulses and, in readout, becomes one 11-bit stage of
// the array's shift chain (din from the left, dout to the right).
//
// fd_rst is the OR of the trip pulse, global reset, readout mode and the
// "stopped at T1" flag. Holding FD in reset once the pixel has stopped (so it
// neither trips nor counts any further) is this design's reading of the
// statement that the ITCU shuts down further integration; gating the counter
// clock with the flag is what keeps the T1 count intact.
module pixel_cell
  import droic_pkg::*;
#(
  parameter realtime PULSE_W = 0.3ns
) (
  input  logic      comp,          // comparator output from the front end
  output logic      fd_rst,        // reset request to the front end (via level shifter)
  input  logic      global_reset,
  input  logic      int_clk,
  input  logic      read_en,
  input  logic      pclk,
  input  pix_word_t din,           // word of the pixel to the left in the chain
  output pix_word_t dout           // this pixel's word
);
  timeunit 1ns; timeprecision 1ps;

  logic cnt_trig, cnt_trig_g;

  pulse_gen #(.PULSE_W(PULSE_W)) u_pg (
    .comp  (comp),
    .clr   (global_reset),
    .pulse (cnt_trig)
  );

  itcu u_itcu (
    .cnt_trig     (cnt_trig),
    .int_clk      (int_clk),
    .read_en      (read_en),
    .pclk         (pclk),
    .global_reset (global_reset),
    .flag_din     (din.win_t1),
    .win_t1       (dout.win_t1)
  );

  // Once the pixel has stopped at T1 no further trigger reaches the counter.
  assign cnt_trig_g = cnt_trig & ~dout.win_t1;

  counter_shift #(.CNT_W(CNT_W)) u_cnt (
    .cnt_trig     (cnt_trig_g),
    .pclk         (pclk),
    .read_en      (read_en),
    .global_reset (global_reset),
    .din          (din.cnt),
    .q            (dout.cnt)
  );

  assign fd_rst = cnt_trig | global_reset | read_en | dout.win_t1;
endmodule
