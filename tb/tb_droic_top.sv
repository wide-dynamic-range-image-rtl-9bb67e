// tb_droic_top: end-to-end test of the sensor readout on a 2 x 4 array,
// with one behavioural analog front end per pixel (each with its own charge
// to trip, spread by about 2 %, as fixed pattern noise).
//
// Sequence: program the scan chain; an imaging frame with bright pixels
// (stop at T1) and dim pixels (integrate to T2), checked word by word
// against the trip counts worked out from the measured window times; a frame
// in readout test mode (0 / 2047 pattern); calibration frames with the
// front ends switched from photodiode to calibration current (CAL_EN=1,
// PD_EN=0), a reference frame at one current and a second at twice that,
// captured from D/DCLK and passed through the calibrator, whose output
// spread must fall at least threefold. Every mechanism is counted and a
// mechanism that never happened is a failure.
module tb_droic_top;
  timeunit 1ns; timeprecision 1ps;
  import droic_pkg::*;

  localparam int NROWS = 2, NCOLS = 4, NPIX = NROWS * NCOLS;
  localparam int LIN_W = CNT_W + 10;
  localparam real HCLK_P = 10.0;          // ns
  localparam real T2_NS  = 20000.0;       // LCLK high phase
  localparam real RD_NS  = 2000.0;        // LCLK low phase (200 PCLK cycles)
  localparam int  T1CYC  = 2;             // T1 = 20 ns, T2/T1 = 1000
  localparam real PW     = 0.3;

  logic hclk = 0, lclk = 0, reset = 0;
  logic scan_clk = 0, scan_en = 0, scan_load = 0, scan_in = 0, scan_out;
  logic comp [NPIX];
  logic fd_rst [NPIX];
  logic cal_en, pd_en, dclk, sync;
  logic [PIX_W-1:0] d;
  logic cal_clk = 0, cal_rst = 0, cal_mode = 0, cal_in_valid = 0, cal_in_first = 0;
  logic [PIX_W-1:0] cal_in_code = '0;
  logic cal_out_valid, cal_busy, cal_done;
  logic [LIN_W-1:0] cal_out_lin, cal_avg;
  logic signed [LIN_W:0] cal_out_code;

  droic_top #(.NROWS(NROWS), .NCOLS(NCOLS)) dut (.*);

  real iph_pd [NPIX], iph_fe [NPIX], ical = 0.0, qtrip [NPIX];
  for (genvar p = 0; p < NPIX; p++) begin : g_fe
    pixel_frontend_model fe (.fd_rst(fd_rst[p]), .qtrip(qtrip[p]), .iph(iph_fe[p]), .tdly(0.0), .comp(comp[p]));
    initial qtrip[p] = 15.5e-15 * (1.0 + 0.02 * (real'(p % 5) - 2.0) + 0.007 * real'(p % 3));
    always_comb iph_fe[p] = (pd_en ? iph_pd[p] : 0.0) + (cal_en ? ical : 0.0);
  end

  always #(HCLK_P / 2) hclk = ~hclk;
  always #4 cal_clk = ~cal_clk;

  int checks = 0, failures = 0;
  int n_scan = 0, n_t1 = 0, n_t2 = 0, n_test = 0, n_cal = 0, n_trip_rst = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s at %0t", what, $realtime); end
  endtask

  // window times, taken from the control signals inside the chip
  realtime t_grst_fall, t_int_rise, t_rd_rise;
  always @(negedge dut.global_reset) t_grst_fall = $realtime;
  always @(posedge dut.int_clk)      t_int_rise  = $realtime;
  always @(posedge dut.rd_en)        t_rd_rise   = $realtime;
  always @(posedge dut.u_array.g_pix[0].u_pix.cnt_trig) n_trip_rst++;

  function automatic int trips(real q, real i, real win);
    real tau;
    if (i <= 0.0) return 0;
    tau = q / i * 1.0e9;
    if (win < tau) return 0;
    return int'($floor((win - tau) / (tau + PW))) + 1;
  endfunction

  task automatic scan_write(input scan_cfg_t c);
    logic [SCAN_W-1:0] v;
    v = c;
    scan_en = 1;
    for (int b = SCAN_W - 1; b >= 0; b--) begin
      scan_in = v[b];
      #20 scan_clk = 1; #20 scan_clk = 0;
    end
    scan_en = 0; scan_load = 1;
    #20 scan_clk = 1; #20 scan_clk = 0;
    scan_load = 0;
    n_scan++;
  endtask

  pix_word_t frame [NPIX];   // indexed row*NCOLS+col

  // one LCLK period; the words arriving on D are stored by pixel position
  task automatic run_frame();
    #(HCLK_P * 3.3) lclk = 1;
    #(T2_NS) lclk = 0;
    @(posedge sync);
    for (int j = 0; j < NPIX; j++) begin
      int r, c;
      @(negedge dclk);
      r = j / NCOLS; c = NCOLS - 1 - j % NCOLS;
      frame[r * NCOLS + c] = pix_word_t'(d);
    end
    #(RD_NS - HCLK_P * (NPIX + 2));
  endtask

  function automatic pix_word_t expect_word(int p, real i);
    int e1, e2;
    pix_word_t w;
    e1 = trips(qtrip[p], i, t_int_rise - t_grst_fall);
    e2 = trips(qtrip[p], i, t_rd_rise - t_grst_fall);
    w.win_t1 = (e1 > 0);
    w.cnt    = CNT_W'(e1 > 0 ? e1 : e2);
    return w;
  endfunction

  function automatic bit close(pix_word_t a, pix_word_t b);
    return a.win_t1 == b.win_t1 && int'(a.cnt) - int'(b.cnt) <= 1 && int'(b.cnt) - int'(a.cnt) <= 1;
  endfunction

  function automatic real stddev(real v[$]);
    real m = 0.0, s = 0.0;
    foreach (v[i]) m += v[i];
    m /= v.size();
    foreach (v[i]) s += (v[i] - m) ** 2;
    return $sqrt(s / v.size());
  endfunction

  task automatic feed_calibrator(input bit mode, output real sd_in, output real sd_out);
    real ins[$], outs[$];
    cal_mode = mode;
    for (int p = 0; p < NPIX; p++) begin
      @(negedge cal_clk);
      cal_in_valid = 1; cal_in_first = (p == 0); cal_in_code = frame[p];
      @(posedge cal_clk); #1;
      cal_in_valid = 0; cal_in_first = 0;
      if (!mode) begin
        check(cal_out_valid, "calibrator output");
        ins.push_back(real'(cal_out_lin));
        outs.push_back(real'(cal_out_code));
      end
    end
    cal_mode = 0;
    if (mode) begin
      wait (cal_done);
      n_cal++;
    end else begin
      sd_in = stddev(ins); sd_out = stddev(outs);
    end
  endtask

  initial begin
    scan_cfg_t cfg;
    real sd_in, sd_out;
    foreach (iph_pd[p]) iph_pd[p] = 0.0;
    #3 reset = 1; cal_rst = 1;
    #50 reset = 0; cal_rst = 0;
    check(pd_en == 1 && cal_en == 0, "reset configuration drives the front ends");

    // ---- imaging frame
    cfg = '{t1_count: T1CNT_W'(T1CYC), testmode: 1'b0, cal_en: 1'b0, pd_en: 1'b1};
    scan_write(cfg);
    check(pd_en == 1 && cal_en == 0, "scan configuration applied");
    foreach (iph_pd[p])
      iph_pd[p] = (p % 2 == 0) ? 2.0e-6 * (1.0 + p) : 3.0e-11 * (1.0 + 3.0 * p);
    run_frame();
    for (int p = 0; p < NPIX; p++) begin
      pix_word_t e;
      e = expect_word(p, iph_pd[p]);
      check(close(frame[p], e), $sformatf("pixel %0d: got %0d/%0d expected %0d/%0d", p,
                                          frame[p].win_t1, frame[p].cnt, e.win_t1, e.cnt));
      if (frame[p].win_t1) n_t1++; else n_t2++;
    end
    check(t_int_rise - t_grst_fall > HCLK_P * T1CYC - 0.01 &&
          t_int_rise - t_grst_fall < HCLK_P * T1CYC + 0.01, "T1 = t1_count HCLK cycles");

    // ---- readout test mode
    cfg.testmode = 1'b1;
    scan_write(cfg);
    run_frame();
    begin
      bit ok;
      ok = 1;
      for (int p = 0; p < NPIX; p++) begin
        int j;
        j = (p / NCOLS) * NCOLS + (NCOLS - 1 - p % NCOLS);
        if (frame[p] != ((j % 2 == 0) ? 11'd0 : 11'd2047)) ok = 0;
      end
      check(ok, "test pattern 0/2047");
      if (!ok) foreach (frame[p]) $display("test word %0d: %0d", p, frame[p]);
      if (ok) n_test++;
    end
    cfg.testmode = 1'b0;

    // ---- calibration: reference current, then twice the reference
    cfg.cal_en = 1'b1; cfg.pd_en = 1'b0;
    scan_write(cfg);
    check(cal_en == 1 && pd_en == 0, "calibration switches");
    foreach (iph_pd[p]) iph_pd[p] = 1.0e-3;   // must not reach the node now
    ical = 0.31e-6;
    run_frame();
    for (int p = 0; p < NPIX; p++)
      check(close(frame[p], expect_word(p, ical)), $sformatf("reference frame pixel %0d: got %0d/%0d expected %0d/%0d", p,
            frame[p].win_t1, frame[p].cnt, expect_word(p, ical).win_t1, expect_word(p, ical).cnt));
    feed_calibrator(1'b1, sd_in, sd_out);
    ical = 0.62e-6;
    run_frame();
    for (int p = 0; p < NPIX; p++)
      check(close(frame[p], expect_word(p, ical)), $sformatf("second frame pixel %0d", p));
    feed_calibrator(1'b0, sd_in, sd_out);
    $display("calibration: spread %f -> %f codes", sd_in, sd_out);
    check(sd_out <= sd_in / 3.0, "calibration reduces the spread");

    check(n_scan > 0, "scan chain loaded");
    check(n_t1 > 0, "a pixel stopped at T1");
    check(n_t2 > 0, "a pixel integrated to T2");
    check(n_test > 0, "test pattern seen");
    check(n_cal > 0, "calibration completed");
    check(n_trip_rst > 0, "trip pulses reset the node");
    $display("mechanisms: scan=%0d T1=%0d T2=%0d test=%0d cal=%0d trips(pixel0)=%0d",
             n_scan, n_t1, n_t2, n_test, n_cal, n_trip_rst);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(20 * (T2_NS + RD_NS));
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
