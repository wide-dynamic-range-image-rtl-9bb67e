// pulse_gen: behavioural model of the pixel's fixed-width pulse generator and
// reset circuit (not synthesizable: the pulse width comes from a delay line).
//
// The comparator output clocks a flip-flop whose D input is tied high. Its Q
// output is the count trigger CNT_TRIG for the pixel counter, and the same
// pulse, level shifted, holds the integration node FD in reset. Q passes
// through a chain of buffers whose delay (PULSE_W) drives the flip-flop's
// asynchronous reset, so every comparator trip produces one pulse of width
// PULSE_W however short the comparator's own pulse is. The default of 0.3 ns
// is the width the design description asks for so that the counter sees a
// pulse wide enough to increment. The extra clear input (global reset) is
// this model's choice so that a frame always starts with the pulse low.
//
// Timing: pulse rises at the comparator's rising edge and falls PULSE_W later;
// a comparator edge arriving while the delayed reset is still high is ignored.
module pulse_gen #(
  parameter realtime PULSE_W = 0.3ns
) (
  input  logic comp,   // comparator output (FD crossed the trip point)
  input  logic clr,    // global reset
  output logic pulse   // CNT_TRIG to the counter, reset request for FD
);
  timeunit 1ns; timeprecision 1ps;

  logic q_dly, clr_any;

  // Buffer chain in the flip-flop's reset path. The clear input is folded in
  // ahead of the delay so that a pulse left high while the clear was already
  // asserted is still removed when the clear goes away.
  assign #(PULSE_W) q_dly = pulse & ~clr;

  assign clr_any = q_dly | clr;

  always_ff @(posedge comp or posedge clr_any) begin
    if (clr_any) pulse <= 1'b0;
    else         pulse <= 1'b1;
  end
endmodule
