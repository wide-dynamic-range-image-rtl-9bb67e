// tb_itcu: checks the adaptive window decision. A trigger before INT_CLK
// sets the window flag at INT_CLK (stop at T1); no trigger before INT_CLK
// leaves it clear (continue to T2), even if triggers follow; global reset
// clears it; in readout mode the flag flip-flop shifts flag_din on PCLK.
module tb_itcu;
  timeunit 1ns; timeprecision 1ps;

  logic cnt_trig = 0, int_clk = 0, read_en = 0, pclk = 0, global_reset = 0, flag_din = 0;
  logic win_t1;
  int checks = 0, failures = 0;

  itcu dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s at %0t", what, $realtime); end
  endtask

  task automatic trig();  cnt_trig = 1; #1 cnt_trig = 0; #1; endtask
  task automatic iclk();  int_clk = 1;  #5 int_clk = 0;  #5; endtask
  task automatic pulse_pclk(); pclk = 1; #5 pclk = 0; #5; endtask
  task automatic grst();  global_reset = 1; #5 global_reset = 0; #5; endtask

  initial begin
    for (int rep = 0; rep < 8; rep++) begin
      int n_before;
      grst();
      check(win_t1 == 0, "clear after reset");
      n_before = (rep % 2 == 0) ? 0 : 1 + $urandom % 4;
      repeat (n_before) trig();
      check(win_t1 == 0, "flag unchanged before INT_CLK");
      iclk();
      check(win_t1 == (n_before > 0), "flag at INT_CLK");
      repeat (3) trig();
      check(win_t1 == (n_before > 0), "later trips do not change the decision");
      // readout: shift
      read_en = 1; #2;
      for (int s = 0; s < 6; s++) begin
        logic b;
        b = 1'($urandom);
        flag_din = b;
        #1 pulse_pclk();
        check(win_t1 == b, "shift loads flag_din");
      end
      read_en = 0; #2;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
