// tb_droic_full: one complete frame of the full 16 x 16 sensor at its
// default parameters, in the dynamic-range measurement set-up: HCLK 2 MHz
// (readout rate), LCLK 250 Hz (2 ms integration, 2 ms readout), T1 = 4 HCLK
// cycles = 2 us, so T2/T1 = 1000. The 256 front ends get the fifteen test
// currents of the dynamic-range measurement (7.75 pA to 20 uA) in turn, and
// further currents spread logarithmically over the same range. Every word
// read from D/DCLK is compared with the trip count worked out from the
// front-end model and the measured window times (within one count; the
// count wraps modulo 1024). The front ends have a 1 ns comparator loop delay,
// which bends the top of the transfer curve as in the measured chip; the
// words for the test currents from 240 pA up are also compared with the
// codes measured on the chip (same window flag, within 2 codes or 6 %).
// Codes are then linearised (T1 codes times 1024) and the span between the
// smallest and largest current that gave a non-zero, unwrapped code is
// reported in dB and must exceed 128 dB. A second frame then runs at the
// headline rates (20 MHz HCLK/PCLK, 10 kHz frames: 80 us integration and a
// 20 us readout phase); all 256 words must arrive within the readout phase
// and match the trip counts.
module tb_droic_full;
  timeunit 1ns; timeprecision 1ps;
  import droic_pkg::*;

  localparam int NROWS = 16, NCOLS = 16, NPIX = NROWS * NCOLS;
  localparam int LIN_W = CNT_W + 10;
  localparam real HCLK_P = 500.0;       // 2 MHz
  localparam real HCLK_FAST = 50.0;     // 20 MHz, second frame
  localparam real T2_FAST = 80000.0;    // 80 us high + 20 us low: 10 kHz frames
  localparam real RD_FAST = 20000.0;
  localparam real T2_NS  = 2.0e6;       // LCLK high, 2 ms
  localparam real RD_NS  = 2.0e6;       // LCLK low, 2 ms
  localparam real QTRIP  = 15.5e-15;
  localparam real PW     = 0.3;
  localparam real TDLY   = 1.0;         // ns, comparator loop delay of the model

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

  droic_top dut (.*);

  real iph [NPIX], iph_fe [NPIX];
  for (genvar p = 0; p < NPIX; p++) begin : g_fe
    pixel_frontend_model fe (.fd_rst(fd_rst[p]), .qtrip(QTRIP), .iph(iph_fe[p]), .tdly(TDLY), .comp(comp[p]));
    always_comb iph_fe[p] = pd_en ? iph[p] : 0.0;
  end

  real hclk_p = HCLK_P;
  always #(hclk_p / 2) hclk = ~hclk;

  int checks = 0, failures = 0, n_t1 = 0, n_t2 = 0, n_wrap = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s at %0t", what, $realtime); end
  endtask

  realtime t_grst_fall, t_int_rise, t_rd_rise;
  always @(negedge dut.global_reset) t_grst_fall = $realtime;
  always @(posedge dut.int_clk)      t_int_rise  = $realtime;
  always @(posedge dut.rd_en)        t_rd_rise   = $realtime;

  function automatic int trips(real i, real win);
    real tau;
    if (i <= 0.0) return 0;
    tau = QTRIP / i * 1.0e9 + TDLY;
    if (win < tau) return 0;
    return int'($floor((win - tau) / (tau + PW))) + 1;
  endfunction

  pix_word_t frame [NPIX];
  int        raw   [NPIX];     // expected trips before wrapping

  initial begin
    int table_code[15] = '{1, 31, 45, 66, 130, 1026, 1028, 1032, 1039, 1110, 1150, 1245,
                           1427, 1746, 2011};
    real table_i[15] = '{7.7505e-12, 2.4027e-10, 3.4877e-10, 5.1153e-10, 1.0076e-9,
                         1.5873e-8, 3.1746e-8, 6.3492e-8, 1.1905e-7, 6.8254e-7,
                         1.0e-6, 2.0e-6, 4.0e-6, 1.0e-5, 2.0e-5};
    real i_min, i_max;
    realtime t_lclk_fall, t_last;
    int n_fast_bad;
    i_min = 1.0; i_max = 0.0;
    for (int p = 0; p < NPIX; p++)
      iph[p] = (p < 60) ? table_i[p % 15]
                        : 7.0e-12 * (10.0 ** (6.5 * real'(p - 60) / real'(NPIX - 61)));
    #3 reset = 1; cal_rst = 1;
    #1000 reset = 0; cal_rst = 0;
    check(dut.cfg.t1_count == 4, "T1 of 4 HCLK cycles after reset");
    #(HCLK_P * 3.3) lclk = 1;
    #(T2_NS) lclk = 0;
    t_lclk_fall = $realtime;
    @(posedge sync);
    for (int j = 0; j < NPIX; j++) begin
      @(negedge dclk);
      frame[(j / NCOLS) * NCOLS + NCOLS - 1 - j % NCOLS] = pix_word_t'(d);
    end
    check(t_int_rise - t_grst_fall > 4 * HCLK_P - 0.01 && t_int_rise - t_grst_fall < 4 * HCLK_P + 0.01,
          "T1 = 2 us");
    for (int p = 0; p < NPIX; p++) begin
      int e1, e2, e;
      bit flag;
      e1 = trips(iph[p], t_int_rise - t_grst_fall);
      e2 = trips(iph[p], t_rd_rise - t_grst_fall);
      flag = (e1 > 0);
      e = flag ? e1 : e2;
      check(frame[p].win_t1 == flag && int'(frame[p].cnt) >= (e - 1) % 1024
            && int'(frame[p].cnt) <= (e + 1) % 1024 + ((e + 1) % 1024 < (e - 1) % 1024 ? 1024 : 0),
            $sformatf("pixel %0d (%g A): got %0d/%0d expected %0d/%0d", p, iph[p],
                      frame[p].win_t1, frame[p].cnt, flag, e % 1024));
      if (flag) n_t1++; else n_t2++;
      if (e > 1023) n_wrap++;
      if (e >= 1 && e <= 1023) begin
        if (iph[p] < i_min) i_min = iph[p];
        if (iph[p] > i_max) i_max = iph[p];
      end
    end
    for (int k = 0; k < 15; k++) begin
      int got, dev;
      got = int'(frame[k]);
      $display("table current %e A -> flag %0d count %4d linear %0d (measured word %0d)", table_i[k],
               frame[k].win_t1, frame[k].cnt,
               frame[k].win_t1 ? int'(frame[k].cnt) * 1024 : int'(frame[k].cnt), table_code[k]);
      // the same window and count as the measured chip, within 2 codes or 6 %
      dev = (got % 1024) - (table_code[k] % 1024);
      if (dev < 0) dev = -dev;
      if (k > 0)
        check(frame[k].win_t1 == (table_code[k] >= 1024) &&
              (dev <= 2 || real'(dev) <= 0.06 * real'(table_code[k] % 1024)),
              $sformatf("%g A: word %0d, measured %0d", table_i[k], got, table_code[k]));
    end
    $display("pixels stopped at T1: %0d, integrated to T2: %0d, counts past 1023: %0d",
             n_t1, n_t2, n_wrap);
    $display("unwrapped non-zero codes from %e A to %e A: %f dB", i_min, i_max,
             20.0 * $log10(i_max / i_min));
    check(n_t1 > 0 && n_t2 > 0, "both integration windows used");
    check(20.0 * $log10(i_max / i_min) > 128.0, "over 128 dB between smallest and largest coded current");
    // second frame at the headline rates: 20 MHz readout clock, 10 kHz frames
    #(t_lclk_fall + RD_NS - $realtime);
    hclk_p = HCLK_FAST;
    #(HCLK_FAST * 3.3) lclk = 1;
    #(T2_FAST) lclk = 0;
    t_lclk_fall = $realtime;
    fork
      #(RD_FAST) lclk = 1;
      begin
        @(posedge sync);
        for (int j = 0; j < NPIX; j++) begin
          @(negedge dclk);
          frame[(j / NCOLS) * NCOLS + NCOLS - 1 - j % NCOLS] = pix_word_t'(d);
        end
        t_last = $realtime;
      end
    join
    check(t_last < t_lclk_fall + RD_FAST, $sformatf("256 words read in %0.1f ns of a %0.0f ns readout phase",
                                                    t_last - t_lclk_fall, RD_FAST));
    check(t_int_rise - t_grst_fall > 4 * HCLK_FAST - 0.01 && t_int_rise - t_grst_fall < 4 * HCLK_FAST + 0.01,
          "T1 = 200 ns at 20 MHz");
    n_fast_bad = 0;
    for (int p = 0; p < NPIX; p++) begin
      int e1, e2, e;
      bit flag;
      e1 = trips(iph[p], t_int_rise - t_grst_fall);
      e2 = trips(iph[p], t_rd_rise - t_grst_fall);
      flag = (e1 > 0);
      e = flag ? e1 : e2;
      if (!(frame[p].win_t1 == flag && int'(frame[p].cnt) >= e - 1 && int'(frame[p].cnt) <= e + 1)) begin
        n_fast_bad++;
        if (n_fast_bad < 5)
          $display("fast frame pixel %0d (%g A): got %0d/%0d expected %0d/%0d", p, iph[p],
                   frame[p].win_t1, frame[p].cnt, flag, e);
      end
    end
    check(n_fast_bad == 0, $sformatf("fast frame: %0d pixels off", n_fast_bad));
    $display("10 kHz frame at 20 MHz: readout of 256 words took %0.1f us", (t_last - t_lclk_fall) / 1000.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(3.0 * (T2_NS + RD_NS));
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
