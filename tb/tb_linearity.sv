// tb_linearity: transfer-curve test of the pixel ADC. One pixel cell, fed by
// the behavioural front end at a fixed small photocurrent, is run through a
// sequence of frames whose long integration window is swept from 2 us to
// 16 ms in 2 us steps. The current is chosen so that the 16 ms window reaches
// the top code 1023, so the sweep walks the counter through all 1024 codes.
//
// For every frame the readout word is compared with the number of trips the
// front end must produce in that window (within one code). Over the sweep the
// bench checks that the code never decreases, that every code from 0 to 1023
// appears, and it measures the differential and integral non-linearity from
// the window width each code occupies. Because the counter only counts
// trips, an ideal charge-balancing front end gives a near-ideal staircase;
// the limits (|DNL| < 0.5 LSB, |INL| < 1 LSB) only allow for the 2 us grid.
//
// Timing: each frame is global reset (50 ns), INT_CLK 1 us after the reset
// ends (no frame trips before it, so the short window never applies), then
// read enable at the end of the swept window.
module tb_linearity;
  timeunit 1ns; timeprecision 1ps;
  import droic_pkg::*;

  localparam real QTRIP  = 15.5e-15;
  localparam real PW     = 0.3;             // ns, fixed pulse width
  localparam real TSTEP  = 2000.0;          // ns, window step
  localparam int  NSTEP  = 8000;            // 2 us .. 16 ms
  localparam real TMAX   = TSTEP * NSTEP;
  // one trip every TMAX/1023.5 ns, so code 1023 is reached just before 16 ms
  localparam real TAU    = TMAX / 1023.5 - PW;
  localparam real IPH    = QTRIP / (TAU * 1.0e-9);

  logic comp, fd_rst, global_reset = 0, int_clk = 0, read_en = 0, pclk = 0;
  pix_word_t din = '0, dout;
  real iph = IPH;
  int checks = 0, failures = 0;
  int first_win [1024];   // first window step at which each code was read
  int prev_code;

  pixel_frontend_model fe (.fd_rst(fd_rst), .qtrip(QTRIP), .iph(iph), .tdly(0.0), .comp(comp));
  pixel_cell dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s at %0t", what, $realtime); end
  endtask

  initial begin
    int code, exp_code, n_bad, missing;
    real w, width, avg, dnl, inl, max_dnl, max_inl;
    foreach (first_win[c]) first_win[c] = -1;
    prev_code = 0;
    n_bad = 0;
    for (int k = 1; k <= NSTEP; k++) begin
      w = TSTEP * k;
      #1 global_reset = 1; #50 global_reset = 0;
      #1000 int_clk = 1; #10 int_clk = 0;
      #(w - 1010.0) read_en = 1;
      #5;
      code = int'(dout.cnt);
      exp_code = int'($floor((w + PW) / (TAU + PW)));
      if (exp_code > 1023) exp_code = 1023;
      if (dout.win_t1 || code < exp_code - 1 || code > exp_code + 1) begin
        n_bad++;
        if (n_bad < 10)
          $display("window %0.0f ns: code %0d/%0d expected %0d", w, dout.win_t1, code, exp_code);
      end
      if (code < prev_code) n_bad++;
      if (first_win[code] < 0) first_win[code] = k;
      prev_code = code;
      #5 read_en = 0;
    end
    check(n_bad == 0, $sformatf("%0d frames off the expected code or out of order", n_bad));
    missing = 0;
    foreach (first_win[c]) if (first_win[c] < 0) missing++;
    check(missing == 0, $sformatf("%0d codes never appeared", missing));
    // code widths in window steps: DNL from codes 1..1022, INL as the
    // running sum of DNL (end-point line)
    avg = real'(first_win[1023] - first_win[1]) / 1022.0;
    max_dnl = 0.0; max_inl = 0.0; inl = 0.0;
    for (int c = 1; c < 1023; c++) begin
      width = real'(first_win[c + 1] - first_win[c]);
      dnl = width / avg - 1.0;
      inl = inl + dnl;
      if ((dnl < 0.0 ? -dnl : dnl) > max_dnl) max_dnl = (dnl < 0.0 ? -dnl : dnl);
      if ((inl < 0.0 ? -inl : inl) > max_inl) max_inl = (inl < 0.0 ? -inl : inl);
    end
    $display("linearity: %0.3f window steps per code, max |DNL| %0.3f LSB, max |INL| %0.3f LSB",
             avg, max_dnl, max_inl);
    check(max_dnl < 0.5, "DNL within 0.5 LSB");
    check(max_inl < 1.0, "INL within 1 LSB");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(TMAX * NSTEP);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
