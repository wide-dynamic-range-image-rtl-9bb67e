// timing_control: the timing and control block (TCBLK).
//
// Makes the four pixel control signals from two free-running clocks and the
// chip reset:
//  * GLOBAL_RESET: a pulse of GRST_CYCLES HCLK periods after each rising edge
//    of LCLK (and held high while `rst` is high). Integration starts when it
//    falls.
//  * INT_CLK: one HCLK period high, exactly t1_count HCLK cycles after
//    GLOBAL_RESET has fallen. An HCLK counter compared with the user count
//    from the scan chain, as in the description. This ends the short window T1.
//  * RD_EN: goes high after the falling edge of LCLK and low at the next
//    rising edge, so LCLK's high phase is the long window T2 and its low phase
//    is the readout.
//  * PCLK: HCLK gated by RD_EN; it runs for the whole readout phase.
// LCLK is brought into the HCLK domain through two flip-flops, so each LCLK
// edge acts 2 to 3 HCLK cycles late. RD_EN is re-timed on the falling edge of
// HCLK so that PCLK = HCLK & RD_EN starts and stops without glitches; the
// first PCLK rising edge comes half an HCLK cycle after RD_EN rises.
// The description makes the reset width with a delay cell in a flip-flop's
// feedback; counting it in HCLK cycles, the synchroniser and the re-timing
// are this design's choices.
module timing_control
  import droic_pkg::*;
#(
  parameter int unsigned GRST_CYCLES = 1
) (
  input  logic               hclk,
  input  logic               lclk,
  input  logic               rst,          // chip RESET, asynchronous, active high
  input  logic [T1CNT_W-1:0] t1_count,
  output logic               global_reset,
  output logic               int_clk,
  output logic               rd_en,
  output logic               pclk
);
  timeunit 1ns; timeprecision 1ps;

  logic [2:0]         lclk_sync;           // two synchroniser stages + previous value
  logic               lclk_rise, lclk_fall;
  logic [7:0]         grst_cnt;
  logic [T1CNT_W-1:0] t_cnt;
  logic               t1_armed;            // INT_CLK not yet issued in this frame
  logic               rd_q;

  assign lclk_rise =  lclk_sync[1] & ~lclk_sync[2];
  assign lclk_fall = ~lclk_sync[1] &  lclk_sync[2];

  always_ff @(posedge hclk or posedge rst) begin
    if (rst) begin
      lclk_sync    <= '0;
      grst_cnt     <= '0;
      global_reset <= 1'b1;
      t_cnt        <= '0;
      t1_armed     <= 1'b0;
      int_clk      <= 1'b0;
      rd_q         <= 1'b0;
    end else begin
      lclk_sync <= {lclk_sync[1:0], lclk};
      int_clk   <= 1'b0;

      if (lclk_rise) begin
        grst_cnt     <= 8'(GRST_CYCLES - 1);
        global_reset <= 1'b1;
        rd_q         <= 1'b0;
        t_cnt        <= '0;
        t1_armed     <= 1'b1;
      end else begin
        if (global_reset) begin
          if (grst_cnt == 0) global_reset <= 1'b0;
          else               grst_cnt <= grst_cnt - 1'b1;
        end else if (t1_armed && !rd_q) begin
          if (t_cnt == t1_count - 1'b1) begin
            int_clk  <= 1'b1;
            t1_armed <= 1'b0;
          end
          t_cnt <= t_cnt + 1'b1;
        end
        if (lclk_fall) rd_q <= 1'b1;
      end
    end
  end

  always_ff @(negedge hclk or posedge rst) begin
    if (rst) rd_en <= 1'b0;
    else     rd_en <= rd_q;
  end

  assign pclk = hclk & rd_en;
endmodule
