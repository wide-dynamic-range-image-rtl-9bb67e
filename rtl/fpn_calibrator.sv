// fpn_calibrator: receiver-side correction of pixel-to-pixel gain spread
// (fixed pattern noise).
//
// Every pixel's code is first made linear: a word whose window flag is set
// (pixel stopped at the short window T1) is multiplied by WIN_RATIO, the ratio
// T2/T1, so that all codes share the LSB of the long window.
//
// Calibration (cal_mode=1): all pixels see the same reference current. The
// frame that starts with the next in_first is stored, one word per pixel, and
// summed. Then the average AVG = SUM / NPIX and its fixed-point reciprocal
// RECIP = 2**RECIP_SHIFT / AVG are computed with a sequential divider, and
// each stored value is replaced by its deviation DEV = value - AVG. The raw
// values are no longer needed; only DEV per pixel, AVG and RECIP are kept.
// cal_busy is high during all this, cal_done afterwards.
//
// Sensing (cal_mode=0, cal_done=1): for each incoming code TP the pixel's
// deviation is scaled by the ratio of the new code to the reference average
// and subtracted: TP_CAL = TP - DEV * TP / AVG. The division is done as a
// multiplication by RECIP with rounding, so TP_CAL is within one LSB of the
// exact value. Before the first calibration the linear code passes unchanged.
//
// The algorithm (reference frame, average, per-pixel deviation, scaled
// subtraction) follows the calibration flow chart of the description, where
// it runs in software or an FPGA. The stream interface, the reciprocal, the
// in-place memory of deviations and the rounding are this design's choices.
//
// Interface: one word per clock with in_valid; in_first marks pixel 0 of a
// frame. Pixels are numbered in arrival order; NPIX must be at least 2.
// out_* follow their input word by one clock. Words that arrive while
// cal_busy is high (after the reference frame) produce no output, and the
// first frame after calibration must begin with in_first. Calibration takes NPIX + 2*(RECIP_SHIFT+1) + NPIX + 3 clocks
// from the first word of the reference frame.
module fpn_calibrator
  import droic_pkg::*;
#(
  parameter int unsigned NPIX        = 256,
  parameter int unsigned WIN_RATIO   = 1024,
  parameter int unsigned RECIP_SHIFT = 32,
  localparam int unsigned LIN_W      = CNT_W + $clog2(WIN_RATIO)  // linear code width
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    cal_mode,
  input  logic                    in_valid,
  input  logic                    in_first,
  input  logic [PIX_W-1:0]        in_code,
  output logic                    out_valid,
  output logic [LIN_W-1:0]        out_lin,   // linearised code before correction
  output logic signed [LIN_W:0]   out_cal,   // corrected code
  output logic                    cal_busy,
  output logic                    cal_done,
  output logic [LIN_W-1:0]        avg
);
  timeunit 1ns; timeprecision 1ps;

  localparam int unsigned IDX_W = $clog2(NPIX);
  localparam int unsigned SUM_W = LIN_W + IDX_W;
  localparam int unsigned DIV_W = RECIP_SHIFT + 1;

  typedef enum logic [2:0] {S_IDLE, S_CAP, S_AVG, S_RECIP, S_DEV} state_t;
  state_t state;

  logic signed [LIN_W:0] mem [NPIX];
  logic [IDX_W-1:0]      idx, cur;
  logic [SUM_W-1:0]      sum;
  logic [DIV_W-1:0]      recip;
  logic                  div_start, div_busy, div_done;
  logic [DIV_W-1:0]      div_num, div_den, div_q;
  pix_word_t             w;
  logic [LIN_W-1:0]      lin;

  assign w   = pix_word_t'(in_code);
  assign lin = w.win_t1 ? LIN_W'(w.cnt * WIN_RATIO) : LIN_W'(w.cnt);
  assign cur = in_first ? '0 : idx;

  seq_divider #(.W(DIV_W)) u_div (
    .clk(clk), .rst(rst), .start(div_start), .num(div_num), .den(div_den),
    .busy(div_busy), .done(div_done), .quot(div_q)
  );

  // Sensing-path arithmetic: DEV * TP * RECIP / 2**RECIP_SHIFT, rounded.
  localparam int unsigned PW = (LIN_W + 1) + (LIN_W + 1) + DIV_W + 1;
  logic signed [PW-1:0] prod, corr;
  assign prod = PW'(mem[cur]) * PW'($signed({1'b0, lin})) * PW'($signed({1'b0, recip}));
  assign corr = (prod + (PW'(1) <<< (RECIP_SHIFT - 1))) >>> RECIP_SHIFT;

  assign cal_busy = (state != S_IDLE);

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      state     <= S_IDLE;
      idx       <= '0;
      sum       <= '0;
      recip     <= '0;
      avg       <= '0;
      cal_done  <= 1'b0;
      div_start <= 1'b0;
      div_num   <= '0;
      div_den   <= '0;
      out_valid <= 1'b0;
      out_lin   <= '0;
      out_cal   <= '0;
    end else begin
      div_start <= 1'b0;
      out_valid <= 1'b0;
      if (in_valid) idx <= (cur == IDX_W'(NPIX - 1)) ? '0 : cur + 1'b1;

      unique case (state)
        S_IDLE: begin
          if (in_valid) begin
            out_valid <= 1'b1;
            out_lin   <= lin;
            out_cal   <= cal_done ? $signed({1'b0, lin}) - (LIN_W+1)'(corr)
                                  : $signed({1'b0, lin});
            if (cal_mode && in_first) begin
              state    <= S_CAP;
              cal_done <= 1'b0;
              mem[0]   <= $signed({1'b0, lin});
              sum      <= SUM_W'(lin);
            end
          end
        end
        S_CAP: begin
          if (in_valid) begin
            mem[cur] <= $signed({1'b0, lin});
            sum      <= sum + SUM_W'(lin);
            if (cur == IDX_W'(NPIX - 1)) begin
              state     <= S_AVG;
              div_start <= 1'b1;
              div_num   <= DIV_W'(sum + SUM_W'(lin));
              div_den   <= DIV_W'(NPIX);
            end
          end
        end
        S_AVG: begin
          if (div_done) begin
            avg       <= LIN_W'(div_q);
            state     <= S_RECIP;
            div_start <= 1'b1;
            div_num   <= DIV_W'(1) << RECIP_SHIFT;
            div_den   <= div_q;
          end
        end
        S_RECIP: begin
          if (div_done) begin
            recip <= div_q;
            idx   <= '0;
            state <= S_DEV;
          end
        end
        S_DEV: begin
          mem[idx] <= mem[idx] - $signed({1'b0, avg});
          if (idx == IDX_W'(NPIX - 1)) begin
            idx      <= '0;
            state    <= S_IDLE;
            cal_done <= 1'b1;
          end else begin
            idx <= idx + 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
