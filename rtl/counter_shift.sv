// counter_shift: pixel counter that doubles as a shift-register stage.
//
// Counting mode (read_en=0): the flip-flops are clocked by the count trigger
// and the value increments by one on every rising edge, so after integration
// it holds the number of comparator trips (wrapping past 2**CNT_W-1).
// Readout mode (read_en=1): the same flip-flops are clocked by PCLK and load
// din, the bits of the pixel to the left, so the pixels of the array form a
// CNT_W-bit-wide shift chain. The clock of every flip-flop is selected by
// read_en, as in the described circuit. Global reset clears the count.
//
// The description builds the counter as a ripple chain (each stage clocked by
// the previous stage). Here the increment is written as one synchronous adder
// clocked by the trigger; the counted value is the same. That is this design's
// choice, made so that the module has a single clock per mode. (A chain of
// toggle flip-flops each clocked by the previous stage's rising Q would count
// down; the counter here counts up, as the described pixel timing and the
// measured codes do.)
module counter_shift #(
  parameter int unsigned CNT_W = 10
) (
  input  logic             cnt_trig,     // count clock (already gated by the ITCU)
  input  logic             pclk,         // shift clock
  input  logic             read_en,      // 0: count, 1: shift
  input  logic             global_reset, // asynchronous, active high
  input  logic [CNT_W-1:0] din,          // from the pixel to the left
  output logic [CNT_W-1:0] q             // count / to the pixel to the right
);
  timeunit 1ns; timeprecision 1ps;

  logic clk_sel;
  assign clk_sel = read_en ? pclk : cnt_trig;

  always_ff @(posedge clk_sel or posedge global_reset) begin
    if (global_reset) q <= '0;
    else if (read_en) q <= din;
    else              q <= q + 1'b1;
  end
endmodule
