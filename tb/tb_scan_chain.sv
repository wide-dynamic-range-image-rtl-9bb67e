// tb_scan_chain: checks the reset configuration, then shifts random
// configurations in MSB first, checks that cfg changes only at the load
// strobe, and that scan_out returns the previous contents bit by bit.
module tb_scan_chain;
  timeunit 1ns; timeprecision 1ps;
  import droic_pkg::*;

  logic scan_clk = 0, rst = 0, scan_en = 0, scan_load = 0, scan_in = 0;
  logic scan_out;
  scan_cfg_t cfg;
  int checks = 0, failures = 0;

  scan_chain dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s at %0t", what, $realtime); end
  endtask

  task automatic clk1(); #5 scan_clk = 1; #5 scan_clk = 0; endtask

  initial begin
    logic [SCAN_W-1:0] prev, v;
    #2 rst = 1;
    #10 rst = 0;
    check(cfg == SCAN_CFG_RESET, $sformatf("reset configuration %h", cfg));
    check(cfg.t1_count == 4 && cfg.pd_en && !cfg.cal_en && !cfg.testmode, "reset fields");
    prev = SCAN_CFG_RESET;
    for (int r = 0; r < 8; r++) begin
      v = SCAN_W'({$urandom, $urandom});
      scan_en = 1;
      for (int b = SCAN_W - 1; b >= 0; b--) begin
        check(scan_out == prev[b], "scan_out returns previous contents");
        scan_in = v[b];
        clk1();
      end
      scan_en = 0;
      check(cfg == scan_cfg_t'(prev), "cfg unchanged before load");
      scan_load = 1; clk1(); scan_load = 0;
      check(cfg == scan_cfg_t'(v), "cfg after load");
      check(cfg.t1_count == v[SCAN_W-1 -: T1CNT_W] && cfg.pd_en == v[0], "field positions");
      prev = v;
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
