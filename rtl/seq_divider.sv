// seq_divider: unsigned restoring divider, one quotient bit per clock.
//
// A pulse on `start` loads num and den; W clock cycles later `done` pulses for
// one cycle with quot = num / den (rounded down). `busy` is high in between.
// Division by zero returns all ones. Used by the calibrator for its two
// divisions per calibration (the average and its reciprocal).
module seq_divider #(
  parameter int unsigned W = 33
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         start,
  input  logic [W-1:0] num,
  input  logic [W-1:0] den,
  output logic         busy,
  output logic         done,
  output logic [W-1:0] quot
);
  timeunit 1ns; timeprecision 1ps;

  logic [W-1:0]          d_q;
  logic [W:0]            rem;
  logic [$clog2(W+1)-1:0] n;
  logic [W:0]            rem_sh, rem_sub;

  assign rem_sh  = {rem[W-1:0], quot[W-1]};
  assign rem_sub = rem_sh - {1'b0, d_q};

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      busy <= 1'b0;
      done <= 1'b0;
      quot <= '0;
      rem  <= '0;
      d_q  <= '0;
      n    <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        busy <= 1'b1;
        quot <= num;                 // dividend bits shift out as quotient bits shift in
        d_q  <= den;
        rem  <= '0;
        n    <= ($clog2(W+1))'(W);
      end else if (busy) begin
        if (!rem_sub[W]) begin
          rem  <= rem_sub;
          quot <= {quot[W-2:0], 1'b1};
        end else begin
          rem  <= rem_sh;
          quot <= {quot[W-2:0], 1'b0};
        end
        n <= n - 1'b1;
        if (n == 1) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end
endmodule
