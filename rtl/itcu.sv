// itcu: integration time control unit of one pixel.
//
// A 1-bit latch (win_pre) is set by the first count trigger after global
// reset. At the rising edge of INT_CLK, which marks the end of the short
// window T1, the latch is sampled into the window flag. If the flag is 1 the
// pixel tripped at least once during T1: it stops counting there, its count
// keeps the value reached at T1, and the flag tells the receiver to scale the
// count by the window ratio. If the flag is 0 the pixel keeps integrating up
// to the end of the long window T2 (RD_EN). This follows the design
// description.
//
// The flag is also the 11th bit of the pixel's readout word: with read_en=1
// its flip-flop is clocked by PCLK and loads flag_din from the pixel to the
// left, just like the ten counter bits. Sharing one flip-flop between the
// two uses, in the same way the counter bits are shared, is this design's
// choice.
module itcu (
  input  logic cnt_trig,     // pulse from the pulse generator
  input  logic int_clk,      // end of T1 (rising edge)
  input  logic read_en,      // readout mode
  input  logic pclk,         // pixel (shift) clock
  input  logic global_reset, // asynchronous, active high
  input  logic flag_din,     // window bit of the pixel to the left
  output logic win_t1        // window flag / shift output
);
  timeunit 1ns; timeprecision 1ps;

  logic win_pre;              // at least one trip since reset
  logic flag_clk;
  assign flag_clk = read_en ? pclk : int_clk;

  always_ff @(posedge cnt_trig or posedge global_reset) begin
    if (global_reset) win_pre <= 1'b0;
    else              win_pre <= 1'b1;
  end

  always_ff @(posedge flag_clk or posedge global_reset) begin
    if (global_reset)  win_t1 <= 1'b0;
    else if (read_en)  win_t1 <= flag_din;
    else               win_t1 <= win_pre;
  end
endmodule
