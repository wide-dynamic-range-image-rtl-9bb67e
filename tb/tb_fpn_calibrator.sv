// tb_fpn_calibrator: the 96-pixel calibration experiment. Every pixel gets
// a random gain error (spread about 1.4 %, built from a sum of uniform draws).
// A reference frame at half scale (the 1 uA reference, about 403 codes) is
// captured in calibration mode, then sensing frames at about 807 codes (the
// 2 uA current) and at a bright level that uses the T1 window flag are
// corrected, followed by frames at levels from 64 to 1000 codes to show the
// one calibration holds across the code range. Checks: the average, the number of clocks the calibration
// takes, each corrected code against TP - DEV*TP/AVG computed here (within
// one code), and that the spread of the corrected frame is at most a third
// of the uncorrected spread (half from 128 codes up in the level sweep,
// where rounding to whole codes is a larger share of the spread).
module tb_fpn_calibrator;
  timeunit 1ns; timeprecision 1ps;
  import droic_pkg::*;

  localparam int NPIX = 96, WIN_RATIO = 1024, RECIP_SHIFT = 32;
  localparam int LIN_W = CNT_W + $clog2(WIN_RATIO);

  logic clk = 0, rst = 0, cal_mode = 0, in_valid = 0, in_first = 0;
  logic [PIX_W-1:0] in_code = '0;
  logic out_valid, cal_busy, cal_done;
  logic [LIN_W-1:0] out_lin, avg;
  logic signed [LIN_W:0] out_cal;
  int checks = 0, failures = 0;

  fpn_calibrator #(.NPIX(NPIX), .WIN_RATIO(WIN_RATIO), .RECIP_SHIFT(RECIP_SHIFT)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s at %0t", what, $realtime); end
  endtask

  real gain [NPIX];
  int  ref_lin [NPIX];
  int  exp_avg;
  real outs [$];
  real ins [$];

  function automatic real stddev(real v[$]);
    real m = 0.0, s = 0.0;
    foreach (v[i]) m += v[i];
    m /= v.size();
    foreach (v[i]) s += (v[i] - m) ** 2;
    return $sqrt(s / v.size());
  endfunction

  // send one frame; mode 0: plain counts, 1: counts with the T1 flag set
  task automatic send_frame(input real level, input bit flag, input bit sensing);
    outs.delete(); ins.delete();
    for (int m = 0; m < NPIX; m++) begin
      int c;
      pix_word_t w;
      c = int'(level * gain[m]);
      w.win_t1 = flag; w.cnt = CNT_W'(c);
      @(negedge clk);
      in_valid = 1; in_first = (m == 0); in_code = w;
      @(posedge clk); #1;
      in_valid = 0; in_first = 0;
      if (sensing) begin
        real tp, e;
        tp = flag ? real'(c * WIN_RATIO) : real'(c);
        e  = tp - (ref_lin[m] - exp_avg) * tp / exp_avg;
        check(out_valid, "output one clock after input");
        check(out_lin == LIN_W'(int'(tp)), "linearised code");
        check(real'(out_cal) >= e - 1.0 && real'(out_cal) <= e + 1.0,
              $sformatf("pixel %0d: got %0d expected %f", m, out_cal, e));
        outs.push_back(real'(out_cal));
        ins.push_back(tp);
      end else if (cal_mode) begin
        ref_lin[m] = c;
      end
    end
  endtask

  initial begin
    int sum, cyc;
    real sd_in, sd_out;
    foreach (gain[m]) begin
      real u;
      u = 0.0;
      for (int k = 0; k < 12; k++) u += real'($urandom_range(9999)) / 10000.0;
      gain[m] = 1.0 + 0.0142 * (u - 6.0);
    end
    #2 rst = 1; #10 rst = 0;
    // before calibration the code passes through
    send_frame(807.0, 0, 0);
    // reference frame (1 uA -> about 403 codes)
    cal_mode = 1;
    @(negedge clk);
    fork
      send_frame(403.5, 0, 0);
      begin
        cyc = 0;
        @(negedge clk); @(posedge clk);       // edge that takes the first word
        while (!cal_done) begin @(posedge clk); #1 cyc++; end
      end
    join
    cal_mode = 0;
    sum = 0;
    foreach (ref_lin[m]) sum += ref_lin[m];
    exp_avg = sum / NPIX;
    check(int'(avg) == exp_avg, $sformatf("average %0d expected %0d", avg, exp_avg));
    check(cyc == 2 * NPIX + 2 * (RECIP_SHIFT + 1) + 3,
          $sformatf("calibration took %0d clocks", cyc));
    check(!cal_busy, "idle after calibration");
    // 2 uA sensing frame
    send_frame(807.0, 0, 1);
    sd_in = stddev(ins); sd_out = stddev(outs);
    $display("807-code frame: spread %f -> %f codes", sd_in, sd_out);
    check(sd_out <= sd_in / 3.0, "spread reduced at least three times");
    // bright frame using the short window
    send_frame(600.0, 1, 1);
    sd_in = stddev(ins); sd_out = stddev(outs);
    $display("T1 frame: spread %f -> %f", sd_in, sd_out);
    check(sd_out <= sd_in / 3.0, "spread reduced for T1 codes");
    // the same calibration applied across the code range
    for (int lvl = 64; lvl <= 1000; lvl += 64) begin
      send_frame(real'(lvl), 0, 1);
      sd_in = stddev(ins); sd_out = stddev(outs);
      if (lvl >= 128)
        check(sd_out <= sd_in / 2.0,
              $sformatf("level %0d: spread %f -> %f", lvl, sd_in, sd_out));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
