// tb_pixel_cell: one digital pixel driven by the behavioural front end.
// For photocurrents spread over seven decades it runs a frame (reset, short
// window T1 ending at INT_CLK, long window T2 = 1000*T1 ending at READ_EN)
// and compares the window flag and count with the trip count worked out from
// the front end's charge-to-trip QTRIP and the 0.3 ns pulse width. Then it
// checks that the word shifts out on PCLK and that a stopped pixel keeps its
// front end in reset.
module tb_pixel_cell;
  timeunit 1ns; timeprecision 1ps;
  import droic_pkg::*;

  localparam real QTRIP = 15.5e-15;
  localparam real PW    = 0.3;       // ns
  localparam real T1    = 200.0;     // ns
  localparam real T2    = 200000.0;  // ns

  logic comp, fd_rst, global_reset = 0, int_clk = 0, read_en = 0, pclk = 0;
  pix_word_t din = '0, dout;
  real iph = 0.0;
  int checks = 0, failures = 0, n_t1 = 0, n_t2 = 0;

  pixel_frontend_model fe (.fd_rst(fd_rst), .qtrip(QTRIP), .iph(iph), .tdly(0.0), .comp(comp));
  pixel_cell dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s at %0t", what, $realtime); end
  endtask

  function automatic int trips(real i, real win);
    real tau = QTRIP / i * 1.0e9;
    if (i <= 0.0 || win < tau) return 0;
    return int'($floor((win - tau) / (tau + PW))) + 1;
  endfunction

  initial begin
    real currents[$] = '{0.0, 5.0e-11, 1.0e-10, 4.0e-10, 2.0e-9, 1.0e-8, 5.0e-8,
                         1.0e-7, 3.0e-7, 1.0e-6, 2.0e-6, 4.0e-6, 6.0e-6};
    foreach (currents[k]) begin
      int e1, e2, lo, hi;
      bit exp_flag;
      int exp_cnt;
      iph = currents[k];
      #1 global_reset = 1; #50 global_reset = 0;
      #(T1) int_clk = 1; #10 int_clk = 0;
      #(T2 - T1 - 10) read_en = 1;
      #5;
      e1 = trips(iph, T1);
      e2 = trips(iph, T2);
      exp_flag = (e1 > 0);
      exp_cnt  = exp_flag ? e1 : e2;
      if (exp_flag) n_t1++; else n_t2++;
      check(dout.win_t1 == exp_flag, $sformatf("flag for %g A", iph));
      lo = exp_cnt - 1; hi = exp_cnt + 1;
      check(int'(dout.cnt) >= lo && int'(dout.cnt) <= hi,
            $sformatf("count for %g A: got %0d expected %0d", iph, dout.cnt, exp_cnt));
      check(fd_rst == 1 && comp == 0, "front end held in reset during readout");
      // shift two words through
      for (int s = 0; s < 2; s++) begin
        pix_word_t v;
        v = pix_word_t'($urandom);
        din = v;
        #10 pclk = 1; #10 pclk = 0;
        check(dout == v, "shift");
      end
      read_en = 0; #5;
    end
    // a stopped pixel keeps FD in reset after INT_CLK
    iph = 1.0e-6;
    global_reset = 1; #50 global_reset = 0;
    #(T1) int_clk = 1; #10 int_clk = 0;
    #1000;
    check(dout.win_t1 == 1 && fd_rst == 1, "stopped at T1 holds FD in reset");
    check(n_t1 > 0 && n_t2 > 0, "both windows used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
